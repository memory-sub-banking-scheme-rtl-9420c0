// alpha_mem: the sub-banked forward-metric (alpha) memory of the SISO decoder.
//
// NB single-port sub-banks (sp_ram) of DEPTH words; one word holds the alpha
// metrics of all trellis states entering one stage (siso_pkg::sm_vec_t) and one
// sub-bank holds the alphas of one data block. With the paper's optimal
// layout NB = p + 1 and DEPTH = L/q. The alpha unit writes through the write
// port; the beta/soft-output side reads through the read port, with the data
// one cycle after the address.
//
// Bypass: at the first cycle of a beta pass the beta side asks for the very word
// the alpha unit is writing in that cycle (the last stage of the block whose
// forward pass just ended). The sub-bank then performs only the write and the
// read port returns the written word one cycle later, as a read would. This
// forwarding path is this design's own answer to that cycle-level collision.
// Any other read and write of the same sub-bank in one cycle is an error
// (assertion, and `conflict`). `bypass` marks the cycles where forwarding occurs.
module alpha_mem
  import siso_pkg::*;
#(
  parameter int unsigned NB    = 3,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,   // only disables the access check during reset
  input  logic          we,
  input  logic [BW-1:0] wbank,
  input  logic [AW-1:0] waddr,
  input  sm_vec_t       wdata,
  input  logic          re,
  input  logic [BW-1:0] rbank,
  input  logic [AW-1:0] raddr,
  output sm_vec_t       rdata,
  output logic          bypass,
  output logic          conflict
);

  localparam int unsigned WW = $bits(sm_vec_t);

  logic          bk_we   [NB];
  logic          bk_re   [NB];
  logic [AW-1:0] bk_addr [NB];
  logic [WW-1:0] bk_q    [NB];
  logic [BW-1:0] rbank_q;
  logic          bypass_q;
  sm_vec_t       fwd_q;

  assign bypass   = we && re && (wbank == rbank) && (waddr == raddr);
  assign conflict = we && re && (wbank == rbank) && (waddr != raddr);

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      bk_we[b]   = we && (wbank == BW'(b));
      bk_re[b]   = re && (rbank == BW'(b)) && !bk_we[b];
      bk_addr[b] = bk_we[b] ? waddr : raddr;
    end
  end

  for (genvar b = 0; b < NB; b++) begin : g_bank
    sp_ram #(.DEPTH(DEPTH), .WIDTH(WW)) u_bank (
      .clk   (clk),
      .we    (bk_we[b]),
      .re    (bk_re[b]),
      .addr  (bk_addr[b]),
      .wdata (wdata),
      .rdata (bk_q[b])
    );
  end

  always_ff @(posedge clk) begin
    if (re) begin
      rbank_q  <= rbank;
      bypass_q <= bypass;
    end
    if (bypass) fwd_q <= wdata;
  end

  assign rdata = bypass_q ? fwd_q : sm_vec_t'(bk_q[rbank_q]);

  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !conflict);

endmodule
