// Shared constants and types of the TI-ADC emulation model.
//
// The model emulates an M-channel time-interleaved ADC with its digital
// background calibration. Samples travel between blocks as 18-bit signed
// two's-complement words on valid/ready streams (AXI4-Stream handshake).
// The numbers below are the configuration the model is built for: 8
// channels, an 8192-entry NCO table, a 16384-entry ADC table with 10-bit
// codes and a 65536-sample output buffer. The register and bank layout
// of the memory-mapped bus is this design's own choice.
package ti_adc_pkg;

  // datapath word
  localparam int unsigned SAMPLE_W = 18;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // bus words: AXI4-Lite data, word address inside a bank, bank number
  localparam int unsigned BUS_W   = 32;
  localparam int unsigned WADDR_W = 16;
  localparam int unsigned BANK_W  = 8;

  // bank numbers (address bits 27:20)
  localparam logic [BANK_W-1:0] BANK_CTRL    = 8'h00;
  localparam logic [BANK_W-1:0] BANK_BUF     = 8'h01;
  localparam logic [BANK_W-1:0] BANK_NCO_LUT = 8'h10;  // + channel
  localparam logic [BANK_W-1:0] BANK_ADC_LUT = 8'h20;  // + channel

  // control register word offsets (bank 0)
  localparam logic [WADDR_W-1:0] REG_RESET      = 16'h0000;
  localparam logic [WADDR_W-1:0] REG_CH_ENABLE  = 16'h0001;
  localparam logic [WADDR_W-1:0] REG_ADC_BYPASS = 16'h0002;
  localparam logic [WADDR_W-1:0] REG_BCA_BYPASS = 16'h0003;
  localparam logic [WADDR_W-1:0] REG_MODE       = 16'h0004;
  localparam logic [WADDR_W-1:0] REG_NCO_START  = 16'h0010;  // + channel
  localparam logic [WADDR_W-1:0] REG_NCO_STEP   = 16'h0020;  // + channel
  localparam logic [WADDR_W-1:0] REG_ADC_OFFSET = 16'h0030;  // + channel
  localparam logic [WADDR_W-1:0] REG_ADC_GAIN   = 16'h0040;  // + channel

  // output buffer word offsets (bank 1)
  localparam logic [WADDR_W-1:0] BUF_DATA   = 16'h0000;  // read pops a sample
  localparam logic [WADDR_W-1:0] BUF_OCC    = 16'h0001;
  localparam logic [WADDR_W-1:0] BUF_STATUS = 16'h0002;  // {full, empty}

  // ADC gain word: signed, GAIN_FRAC fraction bits (1.0 = 1 << GAIN_FRAC)
  localparam int unsigned GAIN_FRAC = 16;

  // bypass bit positions
  typedef struct packed {
    logic lut;
    logic offset;
    logic gain;
  } adc_bypass_t;

  typedef struct packed {
    logic gain;
    logic offset;
  } bca_bypass_t;

  // output buffer operating mode
  typedef enum logic {
    MODE_FIFO     = 1'b0,  // stop the model when the buffer is full
    MODE_CIRCULAR = 1'b1   // keep running, overwrite the oldest sample
  } buf_mode_e;

  // saturate a wide signed value to SAMPLE_W bits
  function automatic sample_t sat_sample(input logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (SAMPLE_W-1)) - 64'sd1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (SAMPLE_W-1));
    if (v > MAXV)      return sample_t'(MAXV);
    else if (v < MINV) return sample_t'(MINV);
    else               return sample_t'(v);
  endfunction

endpackage
