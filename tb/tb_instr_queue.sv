// tb_instr_queue: random pushes and pops against a reference queue.
// Checks count, space and the three decode slots every cycle.
module tb_instr_queue;
  import fu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] push_n, pop_n;
  instr_t [2:0] push_data, slot;
  logic [3:0] count, space;
  int checks = 0, failures = 0;
  instr_t model [$];
  int unsigned seq = 0;

  instr_queue #(.DEPTH(8), .PUSH_W(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_n = 0; pop_n = 0; push_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      chk(count == 4'(model.size()), "count");
      chk(space == 4'(8 - model.size()), "space");
      for (int i = 0; i < 3; i++)
        if (i < model.size()) chk(slot[i].addr == model[i].addr, $sformatf("slot %0d", i));
      begin
        int np, nq;
        nq = $urandom_range(0, 3); if (nq > model.size()) nq = model.size();
        np = $urandom_range(0, 3); if (np > 8 - model.size()) np = 8 - model.size();
        pop_n = 2'(nq); push_n = 2'(np);
        for (int i = 0; i < 3; i++) begin
          push_data[i] = '0;
          push_data[i].addr = seq + i;
        end
        for (int i = 0; i < nq; i++) void'(model.pop_front());
        for (int i = 0; i < np; i++) model.push_back(push_data[i]);
        seq += np;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
