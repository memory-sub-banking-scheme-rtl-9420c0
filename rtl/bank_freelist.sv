// bank_freelist: first-in first-out list of free memory sub-banks.
//
// Holds the numbers of the sub-banks whose contents are obsolete. A sub-bank is
// pushed when the last read of its block finishes and popped when a new block
// must be written. Push and pop may happen in the same cycle; if the list is
// empty the popped number is the one being pushed, which is how a sub-bank
// freed at the end of a time slot is reused in the very next slot. After reset
// the list holds 0, 1, ..., NB-1 in that order. `pop_id` is combinational.
// The reuse order is this design's choice; with it the decoder reproduces the
// bank assignment of the paper's eta = 2 memory-layout table.
module bank_freelist #(
  parameter int unsigned NB = 4,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [BW-1:0] push_id,
  input  logic          pop,
  output logic [BW-1:0] pop_id,
  output logic          empty
);

  logic [BW-1:0] fifo [NB];
  logic [BW-1:0] head, tail;
  logic [BW:0]   count;

  function automatic logic [BW-1:0] inc(input logic [BW-1:0] p);
    return (p == BW'(NB - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty  = (count == 0);
  assign pop_id = empty ? push_id : fifo[head];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) fifo[i] <= BW'(i);
      head  <= '0;
      tail  <= '0;
      count <= (BW+1)'(NB);
    end else begin
      if (empty && push && pop) begin
        // the freed bank is handed straight to the new block
      end else begin
        if (push) begin
          fifo[tail] <= push_id;
          tail       <= inc(tail);
        end
        if (pop)
          head <= inc(head);
        count <= count + (BW+1)'(push) - (BW+1)'(pop);
      end
    end
  end

  // a bank can only be taken if one is free or being freed
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> (!empty || push));
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   push && !pop |-> count < (BW+1)'(NB));

endmodule
