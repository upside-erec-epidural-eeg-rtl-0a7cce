// plv_pac_unit - phase-locking value and phase-amplitude coupling.
//
// Works on complex band signals without extracting phase angles and
// without sine/cosine tables. For a complex sample z = I + jQ the unit
// forms cos(theta) = I/|z| and sin(theta) = Q/|z|, with |z| from the
// alpha-max/beta-min estimator (lsce) and one shared sequential divider.
// The sine and cosine of a phase difference follow from the angle-
// difference identities:
//   cos(ta - tb) = cos ta cos tb + sin ta sin tb
//   sin(ta - tb) = sin ta cos tb - cos ta sin tb
// Over a window of 2^WIN_LOG2 ticks it accumulates
//   PLV = | mean exp(j(theta_a - theta_b)) |           (za vs zb)
//   PAC = | mean |z_hi| * exp(j theta_lo) |            (zh amplitude, zl phase)
// and takes the final magnitudes with lsce again. PLV is a fraction with
// F fraction bits (2^F = perfectly locked); PAC is in the units of |z|.
//
// Approximating sin/cos directly from the complex signals, the LSCE and a
// final feature-computation stage follow the back-end diagram and text.
// The feature formulas, fixed-point format, window and divider are this
// design's own.
//
// Timing: tick samples the four inputs (ignored while a previous tick is
// still being processed); one tick takes 6*(CPX_W+F)+8 cycles. plv/pac
// update with a one-cycle feat_valid pulse after every 2^WIN_LOG2 ticks.
module plv_pac_unit
  import erec_pkg::*;
#(
  parameter int unsigned WIN_LOG2 = 10,
  parameter int unsigned F        = FRAC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tick,
  input  logic signed [CPX_W-1:0] za_i, za_q,   // channel a, PLV band
  input  logic signed [CPX_W-1:0] zb_i, zb_q,   // channel b, PLV band
  input  logic signed [CPX_W-1:0] zl_i, zl_q,   // PAC phase band
  input  logic signed [CPX_W-1:0] zh_i, zh_q,   // PAC amplitude band
  output logic [15:0]             plv,
  output logic [31:0]             pac,
  output logic                    feat_valid,
  output logic                    busy
);
  localparam int unsigned SC_W  = F + 2;             // signed sin/cos
  localparam int unsigned NW    = CPX_W + F;         // divider dividend
  localparam int unsigned DP_W  = SC_W + 2;          // sin/cos of a difference
  localparam int unsigned AP_W  = CPX_W + 3;         // amplitude * sin/cos
  localparam int unsigned ACP_W = DP_W + WIN_LOG2;
  localparam int unsigned ACA_W = AP_W + WIN_LOG2;
  localparam logic [NW-1:0] ONE = NW'(1) << F;

  typedef enum logic [2:0] {S_IDLE, S_DSTART, S_DWAIT, S_ACC, S_FIN} state_e;

  state_e                  state;
  logic signed [CPX_W-1:0] zi [4];
  logic signed [CPX_W-1:0] zq [4];
  logic        [CPX_W-1:0] mag [4];
  logic signed [SC_W-1:0]  sc [6];     // cos a, sin a, cos b, sin b, cos lo, sin lo
  logic [2:0]              didx;
  logic [WIN_LOG2-1:0]     n;
  logic signed [ACP_W-1:0] acc_pc, acc_ps;
  logic signed [ACA_W-1:0] acc_ac, acc_as;

  for (genvar k = 0; k < 4; k++) begin : g_mag
    lsce #(.W(CPX_W)) u_lsce (.i_in(zi[k]), .q_in(zq[k]), .mag(mag[k]));
  end

  // ---- shared divider ----
  logic signed [CPX_W-1:0] comp;
  logic        [CPX_W-1:0] den;
  logic        [NW-1:0]    num, quo;
  logic                    div_start, div_busy, div_done;
  logic signed [SC_W-1:0]  sc_res;

  always_comb begin
    comp = didx[0] ? zq[didx[2:1]] : zi[didx[2:1]];
    den  = mag[didx[2:1]];
    num  = NW'(comp[CPX_W-1] ? CPX_W'(-comp) : CPX_W'(comp)) << F;
  end

  assign div_start = (state == S_DSTART);

  udiv_seq #(.NW(NW), .DW(CPX_W)) u_div (
    .clk, .rst_n, .start(div_start), .num, .den,
    .busy(div_busy), .done(div_done), .quo);

  always_comb begin
    logic [NW-1:0] qc;
    qc = (den == '0) ? '0 : ((quo > ONE) ? ONE : quo);
    sc_res = comp[CPX_W-1] ? -SC_W'(qc) : SC_W'(qc);
  end

  // ---- feature computation ----
  logic signed [2*SC_W:0]    p_cos, p_sin;
  logic signed [DP_W-1:0]    cos_d, sin_d;
  logic signed [CPX_W+SC_W:0] a_cos, a_sin;
  logic signed [AP_W-1:0]    pa_c, pa_s;
  logic [ACP_W-1:0]          plv_mag;
  logic [ACA_W-1:0]          pac_mag;

  always_comb begin
    p_cos = (2*SC_W+1)'(sc[0] * sc[2]) + (2*SC_W+1)'(sc[1] * sc[3]);
    p_sin = (2*SC_W+1)'(sc[1] * sc[2]) - (2*SC_W+1)'(sc[0] * sc[3]);
    cos_d = DP_W'(p_cos >>> F);
    sin_d = DP_W'(p_sin >>> F);
    a_cos = (CPX_W+SC_W+1)'($signed({1'b0, mag[3]}) * sc[4]);
    a_sin = (CPX_W+SC_W+1)'($signed({1'b0, mag[3]}) * sc[5]);
    pa_c  = AP_W'(a_cos >>> F);
    pa_s  = AP_W'(a_sin >>> F);
  end

  lsce #(.W(ACP_W)) u_lsce_plv (.i_in(acc_pc), .q_in(acc_ps), .mag(plv_mag));
  lsce #(.W(ACA_W)) u_lsce_pac (.i_in(acc_ac), .q_in(acc_as), .mag(pac_mag));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      for (int k = 0; k < 4; k++) begin
        zi[k] <= '0;
        zq[k] <= '0;
      end
      for (int k = 0; k < 6; k++) sc[k] <= '0;
      didx       <= '0;
      n          <= '0;
      acc_pc     <= '0;
      acc_ps     <= '0;
      acc_ac     <= '0;
      acc_as     <= '0;
      plv        <= '0;
      pac        <= '0;
      feat_valid <= 1'b0;
    end else begin
      feat_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (tick) begin
          zi[0] <= za_i; zq[0] <= za_q;
          zi[1] <= zb_i; zq[1] <= zb_q;
          zi[2] <= zl_i; zq[2] <= zl_q;
          zi[3] <= zh_i; zq[3] <= zh_q;
          didx  <= '0;
          state <= S_DSTART;
        end
        S_DSTART: state <= S_DWAIT;
        S_DWAIT: if (div_done) begin
          sc[didx] <= sc_res;
          if (didx == 3'd5) state <= S_ACC;
          else begin
            didx  <= didx + 1'b1;
            state <= S_DSTART;
          end
        end
        S_ACC: begin
          acc_pc <= acc_pc + ACP_W'(cos_d);
          acc_ps <= acc_ps + ACP_W'(sin_d);
          acc_ac <= acc_ac + ACA_W'(pa_c);
          acc_as <= acc_as + ACA_W'(pa_s);
          n      <= n + 1'b1;
          state  <= (n == '1) ? S_FIN : S_IDLE;
        end
        S_FIN: begin
          plv        <= 16'(plv_mag >> WIN_LOG2);
          pac        <= 32'(pac_mag >> WIN_LOG2);
          feat_valid <= 1'b1;
          acc_pc <= '0;
          acc_ps <= '0;
          acc_ac <= '0;
          acc_as <= '0;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
