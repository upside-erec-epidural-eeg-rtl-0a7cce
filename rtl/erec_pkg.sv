// erec_pkg - constants and types shared by the eREC digital back-end.
//
// The chip digitises 64 electrode channels with incremental delta-sigma
// ADCs (10-bit result per conversion), ships the raw codes off-chip through
// two 32-channel serializers merged by a DDR output stage, and computes
// phase-locking (PLV) and phase-amplitude-coupling (PAC) features in two
// feature-extraction units. Channel count, result width, serializer split
// and the 10 x 32-bit register bank follow the specification; the register
// map, conversion length and the DSP word widths are this design's own.
package erec_pkg;

  localparam int unsigned N_CH        = 64;   // recording channels
  localparam int unsigned CH_PER_HALF = 32;   // channels per serializer / FEU
  localparam int unsigned ADC_BITS    = 10;   // D_out width
  localparam int unsigned CNT_BITS    = 9;    // up-counter width
  localparam int unsigned CONV_CYCLES = 512;  // clk cycles per conversion (1 kS/s at 512 kHz)

  // DSP word widths
  localparam int unsigned SMP_W  = 14;           // signed sample width inside the LPF bank
  localparam int unsigned CPX_W  = SMP_W + 3;    // I/Q width after the wavelet
  localparam int unsigned FRAC_W = 8;            // fraction bits of sin/cos values

  // Register bank
  localparam int unsigned N_REGS = 10;
  localparam int unsigned REG_AW = 4;
  typedef enum logic [REG_AW-1:0] {
    REG_CTRL     = 4'd0,  // RW
    REG_SW_LO    = 4'd1,  // RW  sw_ext, channels 0..31
    REG_SW_HI    = 4'd2,  // RW  sw_ext, channels 32..63
    REG_FEU0_CFG = 4'd3,  // RW
    REG_FEU1_CFG = 4'd4,  // RW
    REG_FEU0_PLV = 4'd5,  // RO
    REG_FEU0_PAC = 4'd6,  // RO
    REG_FEU1_PLV = 4'd7,  // RO
    REG_FEU1_PAC = 4'd8,  // RO
    REG_STATUS   = 4'd9   // RO
  } reg_addr_e;

  // Feature-extraction unit configuration (one register)
  typedef struct packed {
    logic [2:0] pac_hi;    // [26:24] band whose amplitude is used for PAC
    logic       rsv3;
    logic [2:0] pac_lo;    // [22:20] band whose phase is used for PAC
    logic       rsv2;
    logic [2:0] plv_band;  // [18:16] band compared between channels a and b
    logic [2:0] rsv1;
    logic [4:0] ch_b;      // [12:8]  channel b within the half
    logic [2:0] rsv0;
    logic [4:0] ch_a;      // [4:0]   channel a within the half
  } feu_cfg_t;             // 27 bits, bits 31:27 read as zero

  // Control register
  typedef struct packed {
    logic [15:0] per_period; // [31:16] periodic bias reset: conversions per period
    logic [6:0]  rsv_hi;     // [15:9]
    logic        per_en;     // [8]   periodic bias reset enable
    logic [3:0] feout_sel; // [7:4] signal routed to the feout pin
    logic       sw_sel;    // [3]   1: bias switches from sw_ext registers
    logic       rsv;       // [2]
    logic       feu_en;    // [1]
    logic       ser_en;    // [0]
  } ctrl_t;

  // Everything the write-read registers configure
  typedef struct packed {
    ctrl_t      ctrl;
    logic [N_CH-1:0] sw_ext;
    feu_cfg_t   feu0;
    feu_cfg_t   feu1;
  } cfg_t;

  // Everything the read-only registers show
  typedef struct packed {
    logic [15:0] plv0;
    logic [31:0] pac0;
    logic [15:0] plv1;
    logic [31:0] pac1;
    logic [31:0] status;
  } sts_t;

  // Reset configuration
  localparam feu_cfg_t FEU_CFG_RST = '{pac_hi: 3'd0, pac_lo: 3'd4, plv_band: 3'd2,
                                       ch_b: 5'd1, ch_a: 5'd0, default: '0};
  localparam ctrl_t CTRL_RST = '{per_period: 16'd1000, rsv_hi: 7'd0, per_en: 1'b0,
                                 feout_sel: 4'd0, sw_sel: 1'b0, rsv: 1'b0,
                                 feu_en: 1'b1, ser_en: 1'b1};

endpackage
