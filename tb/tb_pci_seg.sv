// Self-checking test of pci_seg with four agents; agent i claims region i.
// Every agent sends random transactions (random length 0..12, random gaps) to
// regions 0..3 and 9; targets accept with random back-pressure. Checks: each
// transaction reaches exactly the claiming agent, whole and uninterrupted, in
// the order it was sent; transactions to an unclaimed region (9, or the
// sender's own) are dropped with one err_nodev pulse each. Agent 3 answers
// with retry at random; no header may reach it then, and nothing is lost.
module tb_pci_seg;
  import ru_pkg::*;
  localparam int NAG = 4, NPKT = 250;
  localparam logic [NAG-1:0][15:0] REG = {16'h0008, 16'h0004, 16'h0002, 16'h0001};

  logic clk = 0, rst_n = 0;
  logic [NAG-1:0] m_valid, m_ready, t_valid, t_ready, gnt;
  logic [NAG-1:0][63:0] m_data, t_data;
  logic err_nodev, retry;
  logic [NAG-1:0] t_retry;
  int n_retry = 0;
  int checks = 0, failures = 0;

  pci_seg #(.NAG(NAG), .REGIONS(REG)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] pword(int src, int seq, int idx);
    return {8'(src), 16'(seq), 16'(idx), 24'h5A5A00 ^ 24'(seq * 7 + idx)};
  endfunction

  logic [63:0] mq [NAG][$];
  int exp_pk [NAG][NAG];     // expected packets src -> dst
  int got_pk [NAG][NAG];
  int last_seq [NAG][NAG];
  int exp_drop = 0, got_drop = 0;
  // target receive state
  int t_rem [NAG], t_src [NAG], t_seq [NAG], t_idx [NAG];
  bit t_pay [NAG];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build the traffic
  initial begin
    for (int s = 0; s < NAG; s++) begin
      for (int d = 0; d < NAG; d++) begin exp_pk[s][d] = 0; got_pk[s][d] = 0; last_seq[s][d] = -1; end
      for (int p = 0; p < NPKT; p++) begin
        int r, len;
        pci_hdr_t h;
        r   = ($urandom_range(9) == 0) ? 9 : $urandom_range(NAG - 1);
        len = $urandom_range(12);
        h.addr = {4'(r), 28'($urandom)};
        h.tag  = {8'(s), 8'(p)};
        h.len  = 16'(len);
        mq[s].push_back(64'(h));
        for (int k = 0; k < len; k++) mq[s].push_back(pword(s, p, k));
        if (r < NAG && r != s) exp_pk[s][r]++;
        else exp_drop++;
      end
    end
  end

  // masters
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NAG; i++)
      if (m_valid[i] && m_ready[i]) void'(mq[i].pop_front());
  end
  always @(negedge clk) begin
    for (int i = 0; i < NAG; i++) begin
      if (!rst_n) m_valid[i] = 1'b0;
      else if (mq[i].size() == 0) m_valid[i] = 1'b0;
      else if (!m_valid[i] || 1) begin
        // a raised valid stays until the word is taken (it is re-evaluated
        // only after a pop, as the queue head then changes)
        m_valid[i] = m_valid[i] || ($urandom_range(3) != 0);
      end
      m_data[i] = (mq[i].size() > 0) ? mq[i][0] : 64'd0;
      t_ready[i] = ($urandom_range(3) != 0);
      t_retry[i] = (i == 3) && ($urandom_range(2) == 0);
    end
  end

  // targets
  always @(posedge clk) if (rst_n) begin
    if (err_nodev) got_drop++;
    if (retry) n_retry++;
    for (int i = 0; i < NAG; i++)
      if (t_valid[i] && t_retry[i] && !dut.in_pkt) begin
        failures++; $display("FAIL: header offered to a target in retry");
      end
    for (int i = 0; i < NAG; i++) if (t_valid[i] && t_ready[i]) begin
      if (!t_pay[i]) begin
        pci_hdr_t h;
        h = pci_hdr_t'(t_data[i]);
        t_src[i] = int'(h.tag[15:8]);
        t_seq[i] = int'(h.tag[7:0]);
        check(int'(h.addr[31:28]) == i, $sformatf("target %0d got region %0d", i, h.addr[31:28]));
        check(t_seq[i] > last_seq[t_src[i]][i], "order per source");
        last_seq[t_src[i]][i] = t_seq[i];
        got_pk[t_src[i]][i]++;
        t_rem[i] = int'(h.len);
        t_idx[i] = 0;
        t_pay[i] = (h.len != 0);
      end else begin
        check(t_data[i] == pword(t_src[i], t_seq[i], t_idx[i]),
              $sformatf("payload at target %0d", i));
        t_idx[i]++;
        t_rem[i]--;
        if (t_rem[i] == 0) t_pay[i] = 0;
      end
    end
  end

  initial begin
    for (int i = 0; i < NAG; i++) t_pay[i] = 0;
    m_valid = '0; m_data = '0; t_ready = '0; t_retry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (mq[0].size() == 0 && mq[1].size() == 0 && mq[2].size() == 0 && mq[3].size() == 0);
    repeat (20) @(posedge clk);
    for (int s = 0; s < NAG; s++)
      for (int d = 0; d < NAG; d++)
        check(got_pk[s][d] == exp_pk[s][d], $sformatf("packets %0d->%0d: %0d of %0d", s, d, got_pk[s][d], exp_pk[s][d]));
    check(n_retry > 0, "retries happened");
    check(got_drop == exp_drop, $sformatf("drops %0d of %0d", got_drop, exp_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
