// Self-checking test of pci_bridge with four ports; port j leads to region j.
// Command FIFOs of 2 and data FIFOs of 4 words make the FIFOs fill often.
// Every port receives random transactions (length 0..12, random gaps) for
// regions 0..3 and 9; egress ports drain with random back-pressure. Checks:
// each transaction leaves on exactly the port of its region, whole, in the
// order sent from each source; transactions for an unknown region or for the
// port they came from are dropped with one err_nodev pulse each; the FIFOs
// pushed back at least once.
module tb_pci_bridge;
  import ru_pkg::*;
  localparam int NAG = 4, NPKT = 250;
  localparam logic [NAG-1:0][15:0] REG = {16'h0008, 16'h0004, 16'h0002, 16'h0001};

  logic clk = 0, rst_n = 0;
  logic [NAG-1:0] m_valid, m_ready, t_valid, t_ready;
  logic [NAG-1:0][63:0] m_data, t_data;
  logic [NAG-1:0] err_nodev;
  int backpressure = 0;
  int checks = 0, failures = 0;

  pci_bridge #(.NP(NAG), .REGIONS(REG), .CMD_DEPTH(2), .DATA_DEPTH(4)) dut (
    .clk, .rst_n,
    .in_valid (m_valid), .in_ready (m_ready), .in_data (m_data),
    .out_valid (t_valid), .out_ready (t_ready), .out_data (t_data),
    .err_nodev);

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
    end
  end

  // targets
  always @(posedge clk) if (rst_n) begin
    got_drop += $countones(err_nodev);
    for (int i = 0; i < NAG; i++) if (m_valid[i] && !m_ready[i]) backpressure++;
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
    m_valid = '0; m_data = '0; t_ready = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (mq[0].size() == 0 && mq[1].size() == 0 && mq[2].size() == 0 && mq[3].size() == 0);
    repeat (60) @(posedge clk);
    for (int s = 0; s < NAG; s++)
      for (int d = 0; d < NAG; d++)
        check(got_pk[s][d] == exp_pk[s][d], $sformatf("packets %0d->%0d: %0d of %0d", s, d, got_pk[s][d], exp_pk[s][d]));
    check(backpressure > 0, "FIFO back-pressure seen");
    check(got_drop == exp_drop, $sformatf("drops %0d of %0d", got_drop, exp_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
