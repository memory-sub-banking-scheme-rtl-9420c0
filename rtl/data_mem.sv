// data_mem: the sub-banked input-data memory of the SISO decoder.
//
// NB single-port sub-banks (sp_ram) of DEPTH words; one word holds the branch
// metrics of one trellis stage (siso_pkg::bm_word_t) and one sub-bank holds one
// data block. With the paper's optimal layout NB = p + 2q and DEPTH = L/q.
// One write port (new input data) and 2 + ND read ports share the sub-banks:
// the forward (alpha) recursion, the backward (beta) recursion with the soft
// output, and one port per dummy backward unit (ND = 1 unless q > p). The schedule guarantees
// that in any cycle no two ports address the same sub-bank; the module checks
// this with an assertion and also reports it on `conflict`. Read data appears
// one cycle after the address, from the sub-bank that port addressed.
module data_mem
  import siso_pkg::*;
#(
  parameter int unsigned NB    = 4,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned ND    = 1,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,   // only disables the access check during reset
  // write port
  input  logic          we,
  input  logic [BW-1:0] wbank,
  input  logic [AW-1:0] waddr,
  input  bm_word_t      wdata,
  // read port for the alpha recursion
  input  logic          a_re,
  input  logic [BW-1:0] a_bank,
  input  logic [AW-1:0] a_addr,
  output bm_word_t      a_rdata,
  // read port for the beta recursion and soft output
  input  logic          b_re,
  input  logic [BW-1:0] b_bank,
  input  logic [AW-1:0] b_addr,
  output bm_word_t      b_rdata,
  // read ports for the dummy beta recursions
  input  logic          d_re    [ND],
  input  logic [BW-1:0] d_bank  [ND],
  input  logic [AW-1:0] d_addr  [ND],
  output bm_word_t      d_rdata [ND],
  output logic          conflict
);

  localparam int unsigned WW = $bits(bm_word_t);

  logic          bk_we   [NB];
  logic          bk_re   [NB];
  logic [AW-1:0] bk_addr [NB];
  logic [WW-1:0] bk_q    [NB];
  logic [3:0]    bk_hits [NB];
  logic [BW-1:0] a_bank_q, b_bank_q;
  logic [BW-1:0] d_bank_q [ND];

  always_comb begin
    conflict = 1'b0;
    for (int b = 0; b < NB; b++) begin
      bk_we[b]   = we   && (wbank  == BW'(b));
      bk_re[b]   = 1'b0;
      bk_addr[b] = waddr;
      bk_hits[b] = 4'(bk_we[b]);
      if (a_re && a_bank == BW'(b)) begin
        bk_re[b] = 1'b1; bk_addr[b] = a_addr;
        bk_hits[b] = bk_hits[b] + 4'd1;
      end
      if (b_re && b_bank == BW'(b)) begin
        bk_re[b] = 1'b1; bk_addr[b] = b_addr;
        bk_hits[b] = bk_hits[b] + 4'd1;
      end
      for (int u = 0; u < ND; u++) begin
        if (d_re[u] && d_bank[u] == BW'(b)) begin
          bk_re[b] = 1'b1; bk_addr[b] = d_addr[u];
          bk_hits[b] = bk_hits[b] + 4'd1;
        end
      end
      if (bk_hits[b] > 4'd1) conflict = 1'b1;
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
    if (a_re) a_bank_q <= a_bank;
    if (b_re) b_bank_q <= b_bank;
    for (int u = 0; u < ND; u++)
      if (d_re[u]) d_bank_q[u] <= d_bank[u];
  end

  assign a_rdata = bm_word_t'(bk_q[a_bank_q]);
  assign b_rdata = bm_word_t'(bk_q[b_bank_q]);
  for (genvar u = 0; u < ND; u++) begin : g_dport
    assign d_rdata[u] = bm_word_t'(bk_q[d_bank_q[u]]);
  end

  // one access per sub-bank per cycle
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !conflict);

endmodule
