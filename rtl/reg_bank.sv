// reg_bank - the 10 x 32-bit register bank behind the SPI interface.
//
// Write-read registers hold the configuration of the channel bias
// switches, the serializers, the feature-extraction units and the monitor
// pin; read-only registers show the PLV/PAC results and a status word.
// Writes to read-only addresses are ignored; reads of unused bits and of
// addresses above 9 give zero.
//
//   0 CTRL      RW  [0] serializer enable, [1] FEU enable, [3] sw_sel
//                   (1: bias switches from registers 1/2), [7:4] feout select,
//                   [8] periodic bias reset enable, [31:16] its period in
//                   conversions
//   1 SW_LO     RW  sw_ext of channels 0..31
//   2 SW_HI     RW  sw_ext of channels 32..63
//   3 FEU0_CFG  RW  [4:0] channel a, [12:8] channel b, [18:16] PLV band,
//                   [22:20] PAC phase band, [26:24] PAC amplitude band
//   4 FEU1_CFG  RW  as 3, for the second half
//   5 FEU0_PLV  RO  [15:0]     6 FEU0_PAC  RO
//   7 FEU1_PLV  RO  [15:0]     8 FEU1_PAC  RO
//   9 STATUS    RO
//
// Ten addresses of up to 32 bits and the split into write-read and
// read-only registers follow the specification; the map itself is this
// design's own.
//
// Timing: clocked by the SPI clock; a write takes effect on the sclk rising
// edge where wr_en is high. rdata is combinational from addr. The
// configuration is quasi-static for the chip clock domain and the status
// values change at most once per conversion; neither is resynchronised.
module reg_bank
  import erec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [REG_AW-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  output cfg_t              cfg,
  input  sts_t              sts
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.ctrl   <= CTRL_RST;
      cfg.sw_ext <= '0;
      cfg.feu0   <= FEU_CFG_RST;
      cfg.feu1   <= FEU_CFG_RST;
    end else if (wr_en) begin
      unique case (addr)
        REG_CTRL:     cfg.ctrl            <= wdata;
        REG_SW_LO:    cfg.sw_ext[31:0]    <= wdata;
        REG_SW_HI:    cfg.sw_ext[63:32]   <= wdata;
        REG_FEU0_CFG: cfg.feu0            <= wdata[$bits(feu_cfg_t)-1:0];
        REG_FEU1_CFG: cfg.feu1            <= wdata[$bits(feu_cfg_t)-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (addr)
      REG_CTRL:     rdata = 32'(cfg.ctrl);
      REG_SW_LO:    rdata = cfg.sw_ext[31:0];
      REG_SW_HI:    rdata = cfg.sw_ext[63:32];
      REG_FEU0_CFG: rdata = 32'(cfg.feu0);
      REG_FEU1_CFG: rdata = 32'(cfg.feu1);
      REG_FEU0_PLV: rdata = 32'(sts.plv0);
      REG_FEU0_PAC: rdata = sts.pac0;
      REG_FEU1_PLV: rdata = 32'(sts.plv1);
      REG_FEU1_PAC: rdata = sts.pac1;
      REG_STATUS:   rdata = sts.status;
      default:      rdata = '0;
    endcase
  end
endmodule
