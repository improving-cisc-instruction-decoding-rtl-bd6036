// tb_decoded_icache: fills, hits on exact entry address only, replacement
// within a set, and range invalidation by entry and target tags over the
// four 16-byte blocks below and at the written address.
module tb_decoded_icache;
  import fu_pkg::*;
  logic clk = 0, rst_n = 0;
  addr_t lk_addr, wr_entry, inv_addr;
  logic hit, wr_valid, inv_valid, inv_busy;
  logic [1:0] hit_way;
  dline_t hit_line, wr_line;
  logic [6:0] inv_kill;
  int checks = 0, failures = 0, kills = 0;

  decoded_icache #(.ENTRIES(64), .WAYS(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) kills += int'(inv_kill);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input addr_t a, input logic tv, input addr_t t);
    @(negedge clk);
    wr_valid = 1; wr_entry = a; wr_line = '0;
    wr_line.br_addr = a + 32'h1000; wr_line.tgt_valid = tv; wr_line.tgt_addr = t;
    @(negedge clk);
    wr_valid = 0;
  endtask


  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; inv_valid = 0; lk_addr = 0; wr_entry = 0; wr_line = '0; inv_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    put(32'h1000, 0, 0);
    lk_addr = 32'h1000; #1;
    chk(hit && hit_line.br_addr == 32'h2000, "hit after fill");
    lk_addr = 32'h1001; #1;
    chk(!hit, "other address in the block misses");
    // five lines in one set (set stride 16 sets * 16 bytes = 256)
    for (int k = 1; k <= 4; k++) put(32'h1000 + 32'(k) * 32'h100, 0, 0);
    lk_addr = 32'h1000; #1;
    chk(!hit, "oldest evicted by round robin");
    for (int k = 1; k <= 4; k++) begin
      lk_addr = 32'h1000 + 32'(k) * 32'h100; #1;
      chk(hit, $sformatf("line %0d present", k));
    end
    // rewrite of an existing entry keeps one copy
    put(32'h1400, 1, 32'h5008);
    lk_addr = 32'h1400; #1;
    chk(hit && hit_line.tgt_valid, "rewrite in place");
    lk_addr = 32'h1100; #1;
    chk(hit, "rewrite did not evict");
    // invalidation: store to 0x1425 covers blocks 0x13f0..0x1420 -> line 0x1400
    put(32'h2000, 0, 0);
    kills = 0;
    @(negedge clk); inv_valid = 1; inv_addr = 32'h1425;
    @(negedge clk); inv_valid = 0;
    chk(inv_busy, "sweep running");
    repeat (4) @(negedge clk);
    chk(!inv_busy, "sweep took four cycles");
    lk_addr = 32'h1400; #1;
    chk(!hit, "line starting 37 bytes below invalidated");
    lk_addr = 32'h1300; #1;
    chk(hit, "line outside range kept");
    chk(kills == 1, $sformatf("one line killed (%0d)", kills));
    // target tag: store into 0x500c kills nothing by entry, line 0x1300 by target
    put(32'h1300, 1, 32'h5000);
    @(negedge clk); inv_valid = 1; inv_addr = 32'h500c;
    @(negedge clk); inv_valid = 0;
    repeat (4) @(negedge clk);
    lk_addr = 32'h1300; #1;
    chk(!hit, "invalidated through the target tag");
    lk_addr = 32'h2000; #1;
    chk(hit, "unrelated line kept");
    // a store 64 bytes above the entry is out of range
    @(negedge clk); inv_valid = 1; inv_addr = 32'h2040;
    @(negedge clk); inv_valid = 0;
    repeat (4) @(negedge clk);
    lk_addr = 32'h2000; #1;
    chk(hit, "64 bytes above is out of range");
    @(negedge clk); inv_valid = 1; inv_addr = 32'h2030;
    @(negedge clk); inv_valid = 0;
    repeat (4) @(negedge clk);
    #1;
    chk(!hit, "48 bytes above is in range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
