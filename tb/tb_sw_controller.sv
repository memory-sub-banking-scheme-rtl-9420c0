// tb_sw_controller: schedule and sub-bank allocation for eta = 2 (p = 2,
// q = 1), L = 4, N = 32 (K = 8 blocks). Slot by slot it compares the
// sub-banks written and read with the eta = 2 memory-layout table of the
// paper (time slots 0..6: data blocks D1..D8, alpha_1..alpha_7, dummy
// passes in slots 1, 3, 5), checks that no sub-bank is used twice in any
// cycle, that the addresses run forward for the alpha recursion and backward
// otherwise, the soft-output stage indices, and the frame length of
// (K+p+2q-1) slots.
module tb_sw_controller;
  localparam int P = 2, Q = 1, L = 4, N = 32, BL = 4, K = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0;
  logic busy, wr_en, al_re, al_en_q;
  logic dm_re [1], dm_en_q [1], dm_init_q [1], dm_src_in_q [1];
  logic [1:0] dm_bank [1], dm_addr [1];
  logic bt_dsel_q;
  logic bt_re, bt_en_q, bt_init_q, bt_from_dummy_q, last_q, bank_reuse;
  logic [15:0] slot;
  logic [1:0] stage, wr_addr, al_addr, aw_addr_q, bt_addr;
  logic [1:0] wr_bank, al_bank, bt_bank, aw_bank_q, bt_abank;
  logic [4:0] bt_idx_q;
  int checks = 0, failures = 0;

  sw_controller #(.P(P), .Q(Q), .L(L), .N(N)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // the paper's table, slots 0..6 (hardware slot = slot + 1)
  int t_wr  [7] = '{1, 2, 3, 1, 0, 3, 2};     // bank receiving D_{s+2}
  int t_aw  [7] = '{0, 1, 2, 1, 0, 1, 2};     // alpha bank receiving alpha_{s+1}
  int t_ard [7] = '{0, 1, 2, 3, 1, 0, 3};     // data bank read for alpha_{s+1}
  int t_bd  [7] = '{-1, -1, 1, 0, 3, 2, 0};   // data bank read for beta/Ex
  int t_ba  [7] = '{-1, -1, 1, 0, 1, 2, 1};   // alpha bank read for beta/Ex
  int t_dm  [7] = '{0, 1, 0, 1, 0, 1, 0};     // dummy pass in this slot
  int t_bidx [7] = '{-1, -1, 2, 1, 4, 3, 6};  // block of the soft outputs

  int ncyc, nout;

  always @(posedge clk) if (busy && rst_n) begin
    int use_cnt [4];
    use_cnt = '{0, 0, 0, 0};
    if (wr_en) use_cnt[wr_bank]++;
    if (al_re) use_cnt[al_bank]++;
    if (dm_re[0]) use_cnt[dm_bank[0]]++;
    if (bt_re) use_cnt[bt_bank]++;
    foreach (use_cnt[b]) chk(use_cnt[b] <= 1, $sformatf("sub-bank %0d used twice", b));
    if (wr_en) chk(wr_addr == 2'(BL - 1 - int'(stage)), "write address order");
    if (al_re) chk(al_addr == stage, "alpha read address order");
    if (bt_re) chk(bt_addr == 2'(BL - 1 - int'(stage)), "beta read address order");
    ncyc++;
  end

  always @(posedge clk) if (bt_en_q && rst_n) nout++;

  initial begin
    ncyc = 0; nout = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    // hardware slot 0 = paper slot -1: D1 goes to bank 0
    chk(wr_en && wr_bank == 2'd0, "D1 not written to data bank 0");
    for (int s = 0; s < 7; s++) begin
      while (!(int'(slot) == s + 1 && stage == 2'd0)) @(negedge clk);
      chk(wr_en && int'(wr_bank) == t_wr[s], $sformatf("slot %0d: write bank %0d, expected %0d", s, wr_bank, t_wr[s]));
      chk(al_re && int'(al_bank) == t_ard[s], $sformatf("slot %0d: alpha data bank %0d, expected %0d", s, al_bank, t_ard[s]));
      chk(bt_re == (t_bd[s] >= 0), $sformatf("slot %0d: beta activity", s));
      if (t_bd[s] >= 0) begin
        chk(int'(bt_bank) == t_bd[s], $sformatf("slot %0d: beta data bank %0d, expected %0d", s, bt_bank, t_bd[s]));
        chk(int'(bt_abank) == t_ba[s], $sformatf("slot %0d: beta alpha bank %0d, expected %0d", s, bt_abank, t_ba[s]));
      end
      @(negedge clk);   // compute phase of stage 0
      chk(al_en_q && int'(aw_bank_q) == t_aw[s], $sformatf("slot %0d: alpha write bank %0d, expected %0d", s, aw_bank_q, t_aw[s]));
      chk(dm_en_q[0] == (t_dm[s] == 1), $sformatf("slot %0d: dummy activity", s));
      if (t_dm[s] == 1) chk(dm_init_q[0] && dm_src_in_q[0], $sformatf("slot %0d: dummy start on incoming data", s));
      if (t_bidx[s] >= 0) begin
        chk(int'(bt_idx_q) == t_bidx[s] * BL - 1, $sformatf("slot %0d: output index %0d", s, bt_idx_q));
        // a group's first block starts from the dummy metrics, its second continues
        chk(bt_init_q == (t_bidx[s] % 2 == 0), $sformatf("slot %0d: beta start", s));
        if (bt_init_q) chk(bt_from_dummy_q, $sformatf("slot %0d: beta start source", s));
      end
    end
    while (busy) @(negedge clk);
    @(negedge clk);
    chk(ncyc == (K + P + 2 * Q - 1) * BL, $sformatf("frame took %0d cycles", ncyc));
    chk(nout == N, $sformatf("%0d soft-output stages", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
