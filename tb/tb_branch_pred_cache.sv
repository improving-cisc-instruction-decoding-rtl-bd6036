// tb_branch_pred_cache: default heuristic on a miss, stored bit on a hit,
// and replacement when another branch maps to the same entry.
module tb_branch_pred_cache;
  import fu_pkg::*;
  logic clk = 0, rst_n = 0;
  addr_t lk_addr, lk_target, upd_addr;
  logic pred, pred_hit, upd_valid, upd_taken;
  int checks = 0, failures = 0;

  branch_pred_cache #(.ENTRIES(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_valid = 0; upd_addr = 0; upd_taken = 0;
    lk_addr = 32'h100; lk_target = 32'h80;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(!pred_hit && pred, "backward branch predicted taken");
    lk_target = 32'h180; #1;
    chk(!pred_hit && !pred, "forward branch predicted untaken");
    upd_valid = 1; upd_addr = 32'h100; upd_taken = 1;
    @(negedge clk); upd_valid = 0; #1;
    chk(pred_hit && pred, "stored taken overrides heuristic");
    upd_valid = 1; upd_taken = 0; @(negedge clk); upd_valid = 0; lk_target = 32'h80; #1;
    chk(pred_hit && !pred, "stored untaken overrides heuristic");
    upd_valid = 1; upd_addr = 32'h110; upd_taken = 1; @(negedge clk); upd_valid = 0; #1;
    chk(!pred_hit && pred, "conflicting branch evicts entry");
    lk_addr = 32'h110; #1;
    chk(pred_hit && pred, "new branch hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
