// tb_data_serializer - loads 32 random 10-bit results, pulses frame_start
// and rebuilds the results from d, starting at the sync bit (channel 0
// first, MSB first). Checks the frame length (320 bits), the timing of
// sync (two cycles after frame_start), the 32 borrowed mux cycles for the
// feature-extraction unit (every channel once, in order, with its number),
// and that d/sync stay low when disabled.
`timescale 1ns/1ps
module tb_data_serializer;
  logic clk = 0, rst_n = 0;
  logic [319:0] words;
  logic frame_start = 0, en = 1;
  logic [4:0] fe_ch;
  logic d, sync, fe_valid;
  logic [9:0] fe_word;
  int checks = 0, failures = 0;

  data_serializer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nva, nsync, nd;
    logic [9:0] got;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      for (int k = 0; k < 10; k++) words[k*32 +: 32] = $urandom;
      en = (f != 2);
      @(negedge clk);
      frame_start = 1;
      @(negedge clk);
      frame_start = 0;
      // cycle after frame_start pulse: sync comes at the next negedge
      @(negedge clk);
      if (en) begin
        check(sync == 1, "sync two cycles after frame_start");
        for (int ch = 0; ch < 32; ch++) begin
          for (int b = 9; b >= 0; b--) begin
            got[b] = d;
            if (!(ch == 0 && b == 9)) check(sync == 0, "sync only on the first bit");
            @(negedge clk);
          end
          check(got == words[ch*10 +: 10], $sformatf("frame %0d channel %0d got %h", f, ch, got));
        end
        // after 320 bits: FEU slots
        for (int ch = 0; ch < 32; ch++) begin
          check(fe_valid && fe_ch == 5'(ch) && fe_word == words[ch*10 +: 10],
                $sformatf("FEU slot %0d", ch));
          check(d == 0 && sync == 0, "line idle during FEU slots");
          @(negedge clk);
        end
        check(!fe_valid && d == 0, "idle after frame");
      end else begin
        nsync = 0; nd = 0; nva = 0;
        for (int i = 0; i < 360; i++) begin
          nsync += sync; nd += d; nva += fe_valid;
          @(negedge clk);
        end
        check(nsync == 0 && nd == 0, "disabled serializer is silent");
        check(nva == 32, "FEU slots also when disabled");
      end
      repeat (20) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
