// tb_ccr: self-checking test of the Committed Conditions Register. Applies
// random set/clear masks and compares q with a reference that applies
// "clear, then set" to a shadow copy; also checks the reset value.
module tb_ccr;
  import inth_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  cmask_t set_mask, clr_mask, q, model;
  always #5 clk = ~clk;
  ccr dut (.clk, .rst_n, .set_mask, .clr_mask, .q);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_mask = '0; clr_mask = '0; model = '0;
    repeat (2) @(posedge clk);
    #1 chk(q == '0, "reset clears all conditions");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      set_mask = cmask_t'($urandom) & cmask_t'($urandom);
      clr_mask = cmask_t'($urandom) & ~set_mask;
      @(posedge clk);
      model = (model | set_mask) & ~clr_mask;
      #1 chk(q == model, $sformatf("q=%h exp=%h", q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
