// instr_queue: the instruction queue in front of the decoders.
//
// A circular FIFO of pre-split instructions. Its three oldest entries are
// decode slots 1, 2 and 3 (slot 1 feeds the complex decoder); they are shown
// combinationally on slot[0..2] together with the number of valid entries.
// Each cycle up to PUSH_W instructions enter at the tail (push_n, which must
// not exceed space) and up to 3 leave from the head (pop_n, at most count);
// pushes and pops in the same cycle are allowed. Entries appear in the slots
// the cycle after they are pushed.
//
// The three decode slots come from the document's figures of the decoder. The
// depth, push width and handshake are this design's own choices.
module instr_queue
  import fu_pkg::*;
#(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned PUSH_W = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(PUSH_W+1)-1:0] push_n,
  input  instr_t [PUSH_W-1:0]         push_data,
  input  logic [1:0]                  pop_n,
  output instr_t [2:0]                slot,
  output logic [$clog2(DEPTH+1)-1:0]  count,
  output logic [$clog2(DEPTH+1)-1:0]  space
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  instr_t          mem [DEPTH];
  logic [PW-1:0]   head, tail;

  function automatic logic [PW-1:0] wrap(logic [PW-1:0] p, int unsigned k);
    return PW'((int'(p) + k) % DEPTH);
  endfunction

  assign space = CW'(DEPTH) - count;

  always_comb begin
    for (int i = 0; i < 3; i++) slot[i] = mem[wrap(head, i)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      tail  <= wrap(tail, int'(push_n));
      head  <= wrap(head, int'(pop_n));
      count <= count + CW'(push_n) - CW'(pop_n);
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < PUSH_W; i++)
      if (i < int'(push_n)) mem[wrap(tail, i)] <= push_data[i];
  end

  assert property (@(posedge clk) disable iff (!rst_n) CW'(pop_n) <= count)
    else $error("instr_queue: pop beyond count");
  assert property (@(posedge clk) disable iff (!rst_n) CW'(push_n) <= space)
    else $error("instr_queue: push beyond space");
endmodule
