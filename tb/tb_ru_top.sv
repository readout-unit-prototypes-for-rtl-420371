// End-to-end test of the Readout Unit (input RUIO, RUM, output RUIO) at
// reduced size: 128 blocks of 16 words, 64-word port FIFOs, 16-word bridge
// data FIFOs, behavioural memory with 3-cycle latency.
// The testbench plays the host, the FED and BDN network cards and the three
// local buses. It stores fragments arriving by three routes (FED card on bus
// #1, host through the RUM bridge, input RUIO local bus through its bridge),
// requests them from the BDN card and from the host (the latter travels back
// through the output RUIO bridge), asks for an unknown event, releases events,
// fills the memory until the input stalls and frees it again, sends local-bus
// traffic across the bridges, a transaction to an unclaimed address, a bad
// request and a release of an unknown event. Every received transaction is
// compared with what was expected, the free-block count must return to 128,
// and each mechanism is counted: one that never happened is a failure.
// Rate: with both directions busy, input and output must each move at least
// 0.376 words per cycle, which is 400 MByte/s per direction at a 133 MHz
// memory clock.
module tb_ru_top;
  import ru_pkg::*;
  localparam int NB = 128, BW = 16;
  localparam int MAW = $clog2(NB * BW);
  localparam int NAG = 6;   // 0 host, 1 FED, 2 BDN, 3 RUM lb, 4 RUIO-in lb, 5 RUIO-out lb

  logic clk = 0, rst_n = 0;
  logic [NAG-1:0]       tx_v, tx_r, rx_v, rx_r;
  logic [NAG-1:0][63:0] tx_d, rx_d;
  logic mem_req, mem_we, mem_ready, mem_rvalid;
  logic [MAW-1:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata;
  logic init_done, stall_nomem, bus2_retry;
  logic [$clog2(NB):0] free_blocks;
  logic [31:0] frags_in, frags_out;
  logic [7:0] errors;
  int checks = 0, failures = 0;

  ru_top #(.NBLK(NB), .BLOCK_WORDS(BW), .ET_DEPTH(NB), .PORT_FIFO_DEPTH(64),
           .BR_CMD_DEPTH(4), .BR_DATA_DEPTH(16)) dut (
    .clk, .rst_n,
    .host_m_valid (tx_v[0]), .host_m_ready (tx_r[0]), .host_m_data (tx_d[0]),
    .host_t_valid (rx_v[0]), .host_t_ready (rx_r[0]), .host_t_data (rx_d[0]),
    .fed_m_valid  (tx_v[1]), .fed_m_ready  (tx_r[1]), .fed_m_data  (tx_d[1]),
    .fed_t_valid  (rx_v[1]), .fed_t_ready  (rx_r[1]), .fed_t_data  (rx_d[1]),
    .bdn_m_valid  (tx_v[2]), .bdn_m_ready  (tx_r[2]), .bdn_m_data  (tx_d[2]),
    .bdn_t_valid  (rx_v[2]), .bdn_t_ready  (rx_r[2]), .bdn_t_data  (rx_d[2]),
    .lb_in_valid  (lbi_v), .lb_in_ready (lbi_r), .lb_in_data (lbi_d),
    .lb_out_valid (lbo_v), .lb_out_ready (lbo_r), .lb_out_data (lbo_d),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_rvalid, .mem_rdata,
    .init_done, .free_blocks, .stall_nomem, .bus2_retry, .frags_in, .frags_out, .errors);

  dimm_model #(.AW(MAW), .LAT(3), .STALL_PCT(10)) u_mem (.*);

  // The three local buses are 32 bits wide: the agents 3..5 of this testbench
  // move 64-bit words, sent as two 32-bit phases (low half first) and
  // reassembled the same way on receive.
  logic [2:0]       lbi_v, lbi_r, lbo_v, lbo_r;
  logic [2:0][31:0] lbi_d, lbo_d;
  logic [2:0]       t_hi = '0, r_hi = '0;
  logic [2:0][31:0] r_lo = '0;
  for (genvar g = 0; g < 3; g++) begin : g_lb
    assign lbi_v[g]     = tx_v[3+g];
    assign lbi_d[g]     = t_hi[g] ? tx_d[3+g][63:32] : tx_d[3+g][31:0];
    assign tx_r[3+g]    = lbi_r[g] && t_hi[g];
    assign lbo_r[g]     = rx_r[3+g];
    assign rx_v[3+g]    = lbo_v[g] && r_hi[g];
    assign rx_d[3+g]    = {lbo_d[g], r_lo[g]};
  end
  always @(posedge clk) if (rst_n)
    for (int g = 0; g < 3; g++) begin
      if (lbi_v[g] && lbi_r[g]) t_hi[g] <= !t_hi[g];
      if (lbo_v[g] && lbo_r[g]) begin
        if (!r_hi[g]) r_lo[g] <= lbo_d[g];
        r_hi[g] <= !r_hi[g];
      end
    end

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] dword(int id, int k);
    return {16'hE000 ^ 16'(id), 16'(k), 32'h600D0000 ^ 32'(id * 977 + k)};
  endfunction

  function automatic logic [63:0] hdr(logic [3:0] reg_, int off, int tag, int len);
    pci_hdr_t h;
    h.addr = {reg_, 28'(off)};
    h.tag  = 16'(tag);
    h.len  = 16'(len);
    return 64'(h);
  endfunction

  // ---------------- transmit side ----------------
  logic [63:0] txq [NAG][$];
  bit rx_hold = 0;      // when set, receivers are always ready
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NAG; i++) if (tx_v[i] && tx_r[i]) void'(txq[i].pop_front());
  always @(negedge clk)
    for (int i = 0; i < NAG; i++) begin
      tx_v[i] = rst_n && txq[i].size() > 0 && (tx_v[i] || $urandom_range(4) != 0 || rx_hold);
      tx_d[i] = txq[i].size() > 0 ? txq[i][0] : 64'd0;
      rx_r[i] = rx_hold || ($urandom_range(4) != 0);
    end

  function automatic bit tx_idle();
    for (int i = 0; i < NAG; i++) if (txq[i].size() != 0) return 0;
    return 1;
  endfunction

  // a fragment for event `id` of `wc` words, written to the RUM input window
  int wc_of [int];
  task automatic put_frag(int src, int id, int wc);
    ev_hdr_t e;
    e = '0; e.event_id = EVID_W'(id); e.word_count = WC_W'(wc); e.status = 8'h05;
    wc_of[id] = wc;
    txq[src].push_back(hdr(REG_RUM_IN, id * 64, 0, wc + 1));
    txq[src].push_back(64'(e));
    for (int k = 0; k < wc; k++) txq[src].push_back(dword(id, k));
  endtask

  // expected traffic at each receiver, keyed by event id (fragments) or tag
  logic [63:0] expect_pkt [longint][$];
  logic [63:0] expect_mask [longint][$];
  int n_expected = 0, n_received = 0;

  function automatic longint key(int agent, int kind, int id);
    return longint'(agent) * 64'h1_0000_0000 + longint'(kind) * 64'h1000_0000 + longint'(id);
  endfunction

  // request a fragment from `src`, to be delivered to agent `dst`
  task automatic send_req(int src, int dst, int id, bit missing);
    ru_cmd_t c;
    ev_hdr_t e;
    logic [3:0] reg_;
    longint k;
    int wc;
    reg_ = (dst == 0) ? REG_HOST : REG_BDN;
    c.op = OP_SEND; c.event_id = EVID_W'(id); c.dest = {reg_, 28'(id * 64)};
    txq[src].push_back(hdr(REG_RUM_CMD, 0, 0, 1));
    txq[src].push_back(64'(c));
    wc = missing ? 0 : wc_of[id];
    e = '0; e.event_id = EVID_W'(id); e.word_count = WC_W'(wc);
    e.status = missing ? 8'h80 : 8'h05;
    k = key(dst, 1, id);
    expect_pkt[k] = {};
    expect_mask[k] = {};
    expect_pkt[k].push_back(hdr(reg_, id * 64, 0, wc + 1)); expect_mask[k].push_back('1);
    expect_pkt[k].push_back(64'(e));  expect_mask[k].push_back(missing ? '1 : {44'hFFFFFFFFFFF, 20'h0});
    for (int j = 0; j < wc; j++) begin
      expect_pkt[k].push_back(dword(id, j)); expect_mask[k].push_back('1);
    end
    n_expected++;
  endtask

  task automatic release_req(int src, int id);
    ru_cmd_t c;
    c = '0; c.op = OP_RELEASE; c.event_id = EVID_W'(id);
    txq[src].push_back(hdr(REG_RUM_CMD, 0, 0, 1));
    txq[src].push_back(64'(c));
  endtask

  // plain transaction to agent `dst` in region `reg_`, tagged
  task automatic put_plain(int src, int dst, logic [3:0] reg_, int tag, int len);
    longint k;
    k = key(dst, 2, tag);
    expect_pkt[k] = {};
    expect_mask[k] = {};
    txq[src].push_back(hdr(reg_, 0, tag, len));
    expect_pkt[k].push_back(hdr(reg_, 0, tag, len)); expect_mask[k].push_back('1);
    for (int j = 0; j < len; j++) begin
      txq[src].push_back(dword(tag, j));
      expect_pkt[k].push_back(dword(tag, j)); expect_mask[k].push_back('1);
    end
    n_expected++;
  endtask

  // ---------------- receive side ----------------
  logic [63:0] cur [NAG][$];
  int rem [NAG];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NAG; i++) if (rx_v[i] && rx_r[i]) begin
      cur[i].push_back(rx_d[i]);
      if (cur[i].size() == 1) rem[i] = int'(len_of(rx_d[i]));
      else rem[i]--;
      if (rem[i] == 0) begin
        pci_hdr_t h;
        longint k;
        h = pci_hdr_t'(cur[i][0]);
        if (h.addr[31:28] == REG_HOST || h.addr[31:28] == REG_BDN)
          k = (h.len == 0) ? key(i, 2, int'(h.tag)) :
              (h.tag != 0) ? key(i, 2, int'(h.tag)) : key(i, 1, int'(cur[i][1][55:32]));
        else
          k = key(i, 2, int'(h.tag));
        n_received++;
        checks++;
        if (!expect_pkt.exists(k)) begin
          failures++;
          $display("FAIL: agent %0d got unexpected transaction %h", i, cur[i][0]);
        end else begin
          bit ok;
          ok = (expect_pkt[k].size() == cur[i].size());
          for (int j = 0; ok && j < cur[i].size(); j++)
            if (((cur[i][j] ^ expect_pkt[k][j]) & expect_mask[k][j]) != 0) ok = 0;
          if (!ok) begin
            failures++;
            $display("FAIL: agent %0d transaction %h differs", i, cur[i][0]);
          end
          expect_pkt.delete(k);
          expect_mask.delete(k);
        end
        cur[i] = {};
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int m_stall = 0, m_memwait = 0, m_compete = 0, m_br_full = 0, m_drop = 0;
  int m_badop = 0, m_relmiss = 0, m_multi = 0, m_retry = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall_nomem) m_stall++;
    if (bus2_retry) m_retry++;
    if (mem_req && !mem_ready) m_memwait++;
    if (dut.u_mc.wr_want && dut.u_mc.rd_want) m_compete++;
    if (|(dut.pr_iv & ~dut.pr_ir)) m_br_full++;
    if (errors[0] | errors[1] | errors[2] | errors[3]) m_drop++;
    if (errors[7]) m_badop++;
    if (errors[5]) m_relmiss++;
    if (errors[4] | errors[6]) begin
      failures++;
      $display("FAIL: unexpected error flags %b", errors);
    end
  end

  task automatic wait_idle(int extra);
    int t;
    t = 0;
    while ((!tx_idle() || n_received < n_expected) && t < 20000) begin @(posedge clk); t++; end
    repeat (extra) @(posedge clk);
  endtask

  int rate_in, rate_out, win;

  initial begin
    for (int i = 0; i < NAG; i++) rem[i] = 0;
    tx_v = '0; tx_d = '0; rx_r = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    check(free_blocks == NB, "all blocks free after start-up");

    // 1. fragments by three routes: FED card, host via RUM bridge, RUIO-in local bus
    for (int id = 1; id <= 6; id++) begin
      put_frag(1, id, (id * 7) % 40);      // includes a multi-block and 0-length one
      if ((id * 7) % 40 > BW) m_multi++;
    end
    put_frag(1, 7, 0);
    put_frag(0, 20, 33); m_multi++;
    put_frag(4, 21, 5);
    wait_idle(50);
    check(frags_in == 9, $sformatf("9 fragments stored, %0d", frags_in));

    // 2. requests: BDN card gets 1..4, host (via bridges) gets 5,6,20,21
    for (int id = 1; id <= 4; id++) send_req(2, 2, id, 0);
    send_req(0, 0, 5, 0);
    send_req(2, 0, 6, 0);
    send_req(0, 2, 20, 0);
    send_req(2, 2, 21, 0);
    send_req(2, 2, 7, 0);
    send_req(2, 2, 99, 1);                // unknown event
    wait_idle(50);
    check(frags_out == 10, $sformatf("10 fragments sent, %0d", frags_out));

    // 3. local-bus and host traffic across the bridges, an unclaimed region,
    //    a bad request and release of an unknown event
    put_plain(0, 3, REG_RUM_LB, 301, 4);     // host -> RUM local bus
    put_plain(0, 5, REG_RUIOO_LB, 302, 2);   // host -> output RUIO local bus
    put_plain(3, 0, REG_HOST, 303, 3);       // RUM local bus -> host
    put_plain(4, 0, REG_HOST, 304, 0);       // input RUIO local bus -> host
    put_plain(2, 4, REG_RUIOI_LB, 305, 6);   // BDN card -> input RUIO local bus
    put_plain(1, 5, REG_RUIOO_LB, 306, 5);   // FED card -> output RUIO local bus
    txq[0].push_back(hdr(4'd12, 0, 0, 2)); txq[0].push_back(64'd1); txq[0].push_back(64'd2);
    txq[2].push_back(hdr(REG_RUM_CMD, 0, 0, 1)); txq[2].push_back({8'h55, 56'd0});
    release_req(2, 98);
    wait_idle(50);

    // 4. release everything
    foreach (wc_of[id]) release_req(2, id);
    wait_idle(100);
    check(free_blocks == NB, $sformatf("all blocks free again (%0d)", free_blocks));
    wc_of.delete();

    // 5. fill the memory: 40 fragments of 64 words need 160 blocks of 128
    for (int id = 200; id < 240; id++) put_frag(1, id, 64);
    begin
      int t;
      t = 0;
      while (!(stall_nomem && free_blocks == 0) && t < 20000) begin @(posedge clk); t++; end
    end
    repeat (50) @(posedge clk);
    check(free_blocks == 0 && stall_nomem, "input stalls with memory full");
    // requests in transactions of 4 SEND + 4 RELEASE, so the request queue
    // of the RUM output interface fills and answers with retry
    for (int g = 200; g < 240; g += 4) begin
      int n0;
      n0 = txq[2].size();
      for (int id = g; id < g + 4; id++) begin
        send_req(2, 2, id, 0);
        release_req(2, id);
      end
      // merge the eight one-request transactions just queued into one
      begin
        logic [63:0] reqs [$];
        reqs = {};
        while (txq[2].size() > n0) begin
          logic [63:0] w;
          w = txq[2].pop_back();
          if (region_of(w) != REG_RUM_CMD || len_of(w) != 1) reqs.push_front(w);
        end
        txq[2].push_back(hdr(REG_RUM_CMD, 0, 0, reqs.size()));
        foreach (reqs[j]) txq[2].push_back(reqs[j]);
      end
    end
    wait_idle(100);
    check(free_blocks == NB, "memory empty after the stall");
    wc_of.delete();

    // 6. rate: output of stored events while new ones arrive
    u_mem.stall_pct = 0;
    rx_hold = 1;
    for (int id = 300; id < 308; id++) put_frag(1, id, 64);
    wait_idle(50);
    for (int id = 308; id < 324; id++) put_frag(1, id, 64);
    for (int id = 300; id < 308; id++) send_req(2, 2, id, 0);
    rate_in = 0; rate_out = 0; win = 0;
    repeat (100) @(posedge clk);
    while (win < 600) begin
      @(posedge clk);
      win++;
      if (dut.u_mc.wr_go) rate_in++;
      if (dut.u_mc.rd_go) rate_out++;
    end
    check(rate_in * 1000 >= 376 * win, $sformatf("input rate %0d words in %0d cycles", rate_in, win));
    check(rate_out * 1000 >= 376 * win, $sformatf("output rate %0d words in %0d cycles", rate_out, win));
    wait_idle(100);
    rx_hold = 0;

    check(n_received == n_expected, $sformatf("received %0d of %0d transactions", n_received, n_expected));
    check(expect_pkt.num() == 0, $sformatf("%0d expected transactions missing", expect_pkt.num()));
    check(m_stall > 0,   "mechanism: input stall on full memory");
    check(m_memwait > 0, "mechanism: memory not ready");
    check(m_compete > 0, "mechanism: read/write arbitration");
    check(m_br_full > 0, "mechanism: bridge back-pressure");
    check(m_drop > 0,    "mechanism: transaction to unclaimed address dropped");
    check(m_badop == 1,  "mechanism: bad request flagged");
    check(m_relmiss == 1, "mechanism: release of unknown event flagged");
    check(m_multi > 0,   "mechanism: multi-block fragments");
    check(m_retry > 0,   "mechanism: retry of requests on bus #2");
    $display("retries=%0d", m_retry);
    $display("mechanisms: stall=%0d memwait=%0d compete=%0d bridge_full=%0d drop=%0d badop=%0d relmiss=%0d multi=%0d",
             m_stall, m_memwait, m_compete, m_br_full, m_drop, m_badop, m_relmiss, m_multi);
    $display("rate: in %0d out %0d words in %0d cycles", rate_in, rate_out, win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
