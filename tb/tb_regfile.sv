// tb_regfile: random writes on all ports against a reference array, with
// reads on all ports; the highest write port wins on a clash.
module tb_regfile;
  logic clk = 0;
  logic [2:0][8:0] raddr, waddr;
  logic [2:0][31:0] rdata, wdata;
  logic [2:0] we;
  logic [31:0] ref_m [512];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      we = 3'b001; waddr[0] = 9'(a); wdata[0] = 32'(a * 7 + 1); ref_m[a] = 32'(a * 7 + 1);
    end
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int r = 0; r < 3; r++) begin
        checks++;
        if (rdata[r] !== ref_m[raddr[r]]) begin
          failures++; $display("FAIL read %0d", raddr[r]);
        end
      end
      for (int w = 0; w < 3; w++) begin
        we[w] = 1'($urandom); waddr[w] = 9'($urandom_range(0, 15)); wdata[w] = $urandom;
      end
      for (int w = 0; w < 3; w++) if (we[w]) ref_m[waddr[w]] = wdata[w];
      for (int r = 0; r < 3; r++) raddr[r] = 9'($urandom_range(0, 15));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
