// udiv_seq - sequential unsigned restoring divider.
//
// Computes quo = floor(num / den) and the remainder one quotient bit per
// clock cycle, NW cycles per division. A division by zero gives an
// all-ones quotient. Used by the PLV/PAC unit to form sin = Q/|z| and
// cos = I/|z|; this design's own helper.
//
// Timing: start is accepted when busy is low; done pulses for one cycle
// NW cycles later, when quo is valid. quo holds until the next start.
module udiv_seq #(
  parameter int unsigned NW = 26,
  parameter int unsigned DW = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quo
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [DW-1:0] rem;
  logic [DW-1:0] dreg;
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;

  assign trial = {rem[DW-1:0], quo[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dreg <= '0;
      quo  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem  <= '0;
          dreg <= den;
          quo  <= num;      // dividend shifts out of the top, quotient in at the bottom
          cnt  <= CW'(NW);
          busy <= 1'b1;
        end
      end else begin
        if (trial >= {1'b0, dreg}) begin
          rem <= DW'(trial - {1'b0, dreg});
          quo <= {quo[NW-2:0], 1'b1};
        end else begin
          rem <= DW'(trial);
          quo <= {quo[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
