// tb_aes_dec_ctrl: self-checking testbench for aes_dec_ctrl.
//
// Loads the controller several times (once in mid-run) and checks the
// round-constant sequence 36 1b 80 40 20 10 08 04 02 01 00 (the forward
// constants read backwards, then zero), that first_round is high only on the
// first round, that done rises exactly ten clocks after the load and that it
// holds. A watchdog stops it if it hangs.
module tb_aes_dec_ctrl;
  import aes_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst;
  aes_byte_t rc;
  logic      first_round, done;

  aes_dec_ctrl dut (.clk(clk), .rst(rst), .rc(rc), .first_round(first_round), .done(done));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic load();
    @(negedge clk) rst = 1'b0;
    @(negedge clk) rst = 1'b1;
  endtask

  localparam logic [7:0] SEQ [11] = '{8'h36, 8'h1b, 8'h80, 8'h40, 8'h20, 8'h10,
                                      8'h08, 8'h04, 8'h02, 8'h01, 8'h00};

  initial begin
    rst = 1'b1;
    for (int run = 0; run < 3; run++) begin
      load();
      for (int r = 0; r < 10; r++) begin
        expect_eq($sformatf("run %0d step %0d rc", run, r), rc, SEQ[r]);
        expect_eq($sformatf("run %0d step %0d first", run, r), first_round, r == 0);
        expect_eq($sformatf("run %0d step %0d done", run, r), done, 0);
        if (run == 1 && r == 4) break;
        @(negedge clk);
      end
      if (run == 1) continue;
      expect_eq($sformatf("run %0d rc at done", run), rc, 8'h00);
      expect_eq($sformatf("run %0d done", run), done, 1);
      repeat (4) @(negedge clk);
      expect_eq($sformatf("run %0d done held", run), done, 1);
      expect_eq($sformatf("run %0d first stays low", run), first_round, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
