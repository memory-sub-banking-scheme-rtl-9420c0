// sw_controller: time-slot schedule and sub-bank allocation of the
// sliding-window SISO decoder.
//
// A frame of N stages is cut into K = N/BL blocks D_1..D_K of BL = L/q stages
// (eta = p/q, M = 1). A time slot lasts BL cycles. Slot numbering follows the
// paper: in slot s block D_{s+2q} is loaded (its stages in reverse order),
// the forward recursion produces alpha_{s+1} from D_{s+1}, the dummy backward
// recursion of group n runs in slots np-q .. np-1 over D_{np+q} down to
// D_{np+1}, and the actual backward recursion of group n runs in slots
// np .. np+p-1 over D_{np} down to D_{np-p+1}, producing one soft output per
// cycle. The first loaded block is slot 1-2q, so a frame takes K+p+2q-1 slots.
//
// Sub-banks are allocated from two free lists (bank_freelist): one for the
// p+2q data sub-banks and one for the p+1 alpha sub-banks. A block's data and
// alpha sub-banks are released at the end of the slot in which its soft
// outputs are produced and can be rewritten in the next slot. Two small tables
// map a block number (modulo a power of two) to its sub-banks.
//
// When q > p (eta < 1) the dummy passes of consecutive groups overlap; there
// are then ND = ceil(q/p) dummy units and group n uses unit n mod ND. Near the
// end of the frame a dummy pass covers only the blocks that exist (it starts
// from equal metrics at block K).
//
// Every output is the address phase of a sub-bank access; compute-side
// controls (suffix _q) are the same signals one cycle later, when the
// synchronous read data is there. K must be a multiple of p (assertion). The slot equations and bank
// counts are the paper's; the free-list policy, the stage order inside a
// block and the cycle-level pipeline are this design's choices.
module sw_controller #(
  parameter int unsigned P = 2,
  parameter int unsigned Q = 1,
  parameter int unsigned L = 32,
  parameter int unsigned N = 1024,
  localparam int unsigned BL    = L / Q,
  localparam int unsigned K     = N / BL,
  localparam int unsigned NBD   = P + 2 * Q,
  localparam int unsigned NBA   = P + 1,
  localparam int unsigned NSL   = K + P + 2 * Q - 1,
  localparam int unsigned ND    = (Q + P - 1) / P,
  localparam int unsigned DBW   = $clog2(NBD),
  localparam int unsigned ABW   = (NBA > 1) ? $clog2(NBA) : 1,
  localparam int unsigned AW    = (BL > 1) ? $clog2(BL) : 1,
  localparam int unsigned IDX_W = $clog2(N),
  localparam int unsigned MW    = $clog2(2 * NBD),
  localparam int unsigned DSW   = (ND > 1) ? $clog2(ND) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic [15:0]      slot,        // hardware slot number (paper slot + 2q - 1)
  output logic [AW-1:0]    stage,       // cycle inside the slot
  // input data write
  output logic             wr_en,       // = in_ready
  output logic [DBW-1:0]   wr_bank,
  output logic [AW-1:0]    wr_addr,
  // forward recursion
  output logic             al_re,
  output logic [DBW-1:0]   al_bank,
  output logic [AW-1:0]    al_addr,
  output logic             al_en_q,     // alpha unit consumes a stage
  output logic [ABW-1:0]   aw_bank_q,   // alpha memory write
  output logic [AW-1:0]    aw_addr_q,
  // dummy backward recursions, one set per dummy unit
  output logic             dm_re       [ND], // reads stored data
  output logic [DBW-1:0]   dm_bank     [ND],
  output logic [AW-1:0]    dm_addr     [ND],
  output logic             dm_en_q     [ND],
  output logic             dm_init_q   [ND],
  output logic             dm_src_in_q [ND], // takes the word just loaded
  // actual backward recursion and soft output
  output logic             bt_re,
  output logic [DBW-1:0]   bt_bank,
  output logic [ABW-1:0]   bt_abank,
  output logic [AW-1:0]    bt_addr,
  output logic             bt_en_q,
  output logic             bt_init_q,
  output logic             bt_from_dummy_q,
  output logic [DSW-1:0]   bt_dsel_q,   // dummy unit whose metrics start the pass
  output logic [IDX_W-1:0] bt_idx_q,
  output logic             last_q,      // last soft-output stage of the frame
  output logic             bank_reuse   // a freed data sub-bank is refilled at once
);

  typedef struct packed {
    logic      wr_v;  int wr_blk;
    logic      al_v;  int al_blk;
    logic      bt_v;  int bt_blk;  logic bt_first; logic bt_from_dummy; int bt_dsel;
  } roles_t;

  typedef struct packed {
    logic v; int blk; logic first; logic src_in;
  } drole_t;

  // dummy unit u in hardware slot sl: group n with np-q <= s <= np-1,
  // n = u (mod ND), np < K, working on block 2np - s if it exists
  function automatic drole_t dummy_role(input int sl, input int u);
    drole_t r;
    int s, nlo, nhi, n, lastb;
    r = '0;
    s = sl - (2 * int'(Q) - 1);
    if (s + int'(Q) >= int'(P)) begin
      nhi = (s + int'(Q)) / int'(P);
      nlo = (s + 1 <= int'(P)) ? 1 : (s + int'(P)) / int'(P);
      n   = nlo + ((u - (nlo % int'(ND)) + int'(ND)) % int'(ND));
      r.blk = 2 * n * int'(P) - s;
      lastb = (n * int'(P) + int'(Q) < int'(K)) ? n * int'(P) + int'(Q) : int'(K);
      r.v      = (n <= nhi) && (n * int'(P) < int'(K)) && (r.blk <= int'(K));
      r.first  = (r.blk == lastb);
      r.src_in = (r.blk == s + 2 * int'(Q));
    end
    return r;
  endfunction

  // what each unit does in hardware slot sl (paper slot sl - (2q-1))
  function automatic roles_t roles(input int sl);
    roles_t r;
    int s, n, k;
    r = '0;
    r.wr_v   = (sl < int'(K));
    r.wr_blk = sl + 1;
    r.al_blk = sl + 2 - 2 * int'(Q);
    r.al_v   = (r.al_blk >= 1) && (r.al_blk <= int'(K));
    s = sl - (2 * int'(Q) - 1);           // paper slot
    if (s >= int'(P)) begin
      n = s / int'(P);
      k = s % int'(P);
      r.bt_v          = (n * int'(P) <= int'(K));
      r.bt_blk        = n * int'(P) - k;
      r.bt_first      = (k == 0);
      r.bt_from_dummy = (n * int'(P) < int'(K));
      r.bt_dsel       = n % int'(ND);
    end
    return r;
  endfunction

  logic [DBW-1:0] dmap [2**MW];
  logic [ABW-1:0] amap [2**MW];
  logic [DBW-1:0] cur_wbank;
  logic [ABW-1:0] cur_abank;

  roles_t rc, rn;
  logic   slot_end, adv, first_slot;
  int     nsl;

  assign rc         = roles(int'(slot));
  assign slot_end   = busy && (stage == AW'(BL - 1));
  assign first_slot = !busy && start;
  assign adv        = first_slot || (slot_end && (int'(slot) < int'(NSL) - 1));
  assign nsl        = first_slot ? 0 : int'(slot) + 1;
  assign rn         = roles(nsl);

  // free lists
  logic           d_push, d_pop, a_push, a_pop;
  logic [DBW-1:0] d_push_id, d_pop_id;
  logic [ABW-1:0] a_push_id, a_pop_id;
  logic           d_empty, a_empty;

  assign d_push    = slot_end && rc.bt_v;
  assign a_push    = slot_end && rc.bt_v;
  assign d_push_id = dmap[MW'(rc.bt_blk)];
  assign a_push_id = amap[MW'(rc.bt_blk)];
  assign d_pop     = adv && rn.wr_v;
  assign bank_reuse = d_push && d_pop && d_empty;
  assign a_pop     = adv && rn.al_v;

  bank_freelist #(.NB(NBD)) u_dfree (
    .clk, .rst_n, .push(d_push), .push_id(d_push_id), .pop(d_pop),
    .pop_id(d_pop_id), .empty(d_empty)
  );
  bank_freelist #(.NB(NBA)) u_afree (
    .clk, .rst_n, .push(a_push), .push_id(a_push_id), .pop(a_pop),
    .pop_id(a_pop_id), .empty(a_empty)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      slot  <= '0;
      stage <= '0;
    end else begin
      if (adv) begin
        busy  <= 1'b1;
        slot  <= 16'(nsl);
        stage <= '0;
      end else if (slot_end) begin
        busy  <= 1'b0;
        stage <= '0;
      end else if (busy) begin
        stage <= stage + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (d_pop) begin
      dmap[MW'(rn.wr_blk)] <= d_pop_id;
      cur_wbank            <= d_pop_id;
    end
    if (a_pop) begin
      amap[MW'(rn.al_blk)] <= a_pop_id;
      cur_abank            <= a_pop_id;
    end
  end

  // address phase
  assign wr_en    = busy && rc.wr_v;
  assign wr_bank  = cur_wbank;
  assign wr_addr  = AW'(BL - 1) - stage;
  assign al_re    = busy && rc.al_v;
  assign al_bank  = dmap[MW'(rc.al_blk)];
  assign al_addr  = stage;
  assign bt_re    = busy && rc.bt_v;
  assign bt_bank  = dmap[MW'(rc.bt_blk)];
  assign bt_abank = amap[MW'(rc.bt_blk)];
  assign bt_addr  = AW'(BL - 1) - stage;

  // compute phase: one cycle later
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      al_en_q <= 1'b0;
      bt_en_q <= 1'b0;
      last_q  <= 1'b0;
    end else begin
      al_en_q <= al_re;
      bt_en_q <= bt_re;
      last_q  <= slot_end && !adv;
    end
    aw_bank_q       <= cur_abank;
    aw_addr_q       <= stage;
    bt_init_q       <= rc.bt_first && (stage == '0);
    bt_from_dummy_q <= rc.bt_from_dummy;
    bt_dsel_q       <= DSW'(rc.bt_dsel);
    bt_idx_q        <= IDX_W'((rc.bt_blk - 1) * int'(BL) + int'(BL) - 1 - int'(stage));
  end

  for (genvar u = 0; u < ND; u++) begin : g_dummy
    drole_t dr;
    assign dr         = dummy_role(int'(slot), u);
    assign dm_re[u]   = busy && dr.v && !dr.src_in;
    assign dm_bank[u] = dmap[MW'(dr.blk)];
    assign dm_addr[u] = AW'(BL - 1) - stage;
    always_ff @(posedge clk) begin
      if (!rst_n) dm_en_q[u] <= 1'b0;
      else        dm_en_q[u] <= busy && dr.v;
      dm_init_q[u]   <= dr.first && (stage == '0);
      dm_src_in_q[u] <= dr.src_in;
    end
  end

  initial begin
    assert (K % P == 0) else $error("sw_controller: K must be a multiple of p");
    assert (N % BL == 0) else $error("sw_controller: N must be a multiple of L/q");
  end

endmodule
