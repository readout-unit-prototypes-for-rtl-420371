// Self-checking test of the RUM output interface. Request transactions carry
// OP_SEND, OP_RELEASE and one unknown operation; the testbench plays the MMU
// (random readiness) and feeds the output FIFO side with fragments in request
// order. Checks: the MMU sees exactly the valid requests, the bad one is
// flagged, and each fragment leaves as one write to the address of its request
// with length 1 + word count, header and data intact. The request queue is
// cut to 4 words so that it fills and the interface answers with retry.
module tb_rum_pci_out;
  import ru_pkg::*;
  logic clk = 0, rst_n = 0;
  logic t_ready, t_retry, tb_valid, m_valid, m_ready, cmd_valid, cmd_ready;
  logic [63:0] t_data, m_data;
  mmu_cmd_t cmd;
  logic fifo_valid, fifo_ready;
  fifo_word_t fifo_data;
  logic err_bad_op;
  logic [31:0] sent_count;
  int checks = 0, failures = 0;

  rum_pci_out #(.REQ_DEPTH(4), .DEST_DEPTH(4)) dut (
    .clk, .rst_n, .t_valid (tb_valid && !t_retry), .t_ready, .t_retry, .t_data,
    .m_valid, .m_ready, .m_data, .cmd_valid, .cmd_ready, .cmd,
    .fifo_valid, .fifo_ready, .fifo_data, .err_bad_op, .sent_count);
  int n_retry = 0;
  always @(posedge clk) if (rst_n && tb_valid && t_retry) n_retry++;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NREQ = 40;
  logic [63:0] tq [$];
  mmu_cmd_t    exp_cmd [$];
  int          send_ids [$];
  logic [31:0] send_dest [$];
  int          wc_of [int];
  fifo_word_t  fq [$];
  logic [63:0] exp_out [$];
  int nbad = 0, gotbad = 0, nsend = 0;

  initial begin
    // requests in transactions of 1..4 requests
    int r;
    r = 0;
    while (r < NREQ) begin
      int n;
      pci_hdr_t h;
      n = $urandom_range(1, 4);
      if (r + n > NREQ) n = NREQ - r;
      h = '0; h.addr = {REG_RUM_CMD, 28'd0}; h.len = 16'(n);
      tq.push_back(64'(h));
      for (int k = 0; k < n; k++) begin
        ru_cmd_t c;
        c = '0;
        c.event_id = EVID_W'(100 + r);
        c.dest = {REG_BDN, 28'(r * 16)};
        case ($urandom_range(5))
          0: c.op = OP_RELEASE;
          1: c.op = ru_op_e'(8'h7F);
          default: c.op = OP_SEND;
        endcase
        tq.push_back(64'(c));
        if (c.op == OP_SEND || c.op == OP_RELEASE) begin
          mmu_cmd_t m;
          m.op = c.op; m.event_id = c.event_id;
          exp_cmd.push_back(m);
        end else nbad++;
        if (c.op == OP_SEND) begin
          ev_hdr_t eh;
          pci_hdr_t oh;
          int wc;
          wc = $urandom_range(0, 6);
          eh = '0; eh.event_id = c.event_id; eh.word_count = WC_W'(wc);
          oh = '0; oh.addr = c.dest; oh.len = 16'(wc + 1);
          exp_out.push_back(64'(oh));
          exp_out.push_back(64'(eh));
          send_ids.push_back(100 + r);
          wc_of[100 + r] = wc;
          nsend++;
          for (int j = 0; j <= wc; j++) begin
            fifo_word_t w;
            w = '0;
            w.first = (j == 0);
            w.last = (j == wc);
            w.data = (j == 0) ? 64'(eh) : {32'(100 + r), 32'(j)};
            if (j > 0) exp_out.push_back(w.data);
          end
        end
        r++;
      end
    end
  end

  // MMU stand-in: on each accepted OP_SEND the fragment becomes available
  always @(posedge clk) if (rst_n) begin
    if (tb_valid && !t_retry && t_ready) void'(tq.pop_front());
    if (err_bad_op) gotbad++;
    if (cmd_valid && cmd_ready) begin
      check(exp_cmd.size() > 0 && cmd == exp_cmd[0], "command to MMU");
      if (exp_cmd.size() > 0) void'(exp_cmd.pop_front());
      if (cmd.op == OP_SEND) begin
        int id, wc;
        id = int'(cmd.event_id);
        wc = wc_of[id];
        for (int j = 0; j <= wc; j++) begin
          fifo_word_t w;
          ev_hdr_t eh;
          eh = '0; eh.event_id = EVID_W'(id); eh.word_count = WC_W'(wc);
          w = '0;
          w.first = (j == 0);
          w.last = (j == wc);
          w.data = (j == 0) ? 64'(eh) : {32'(id), 32'(j)};
          fq.push_back(w);
        end
      end
    end
    if (fifo_valid && fifo_ready) void'(fq.pop_front());
    if (m_valid && m_ready) begin
      check(exp_out.size() > 0 && m_data == exp_out[0],
            $sformatf("bus word %h exp %h", m_data, exp_out.size() > 0 ? exp_out[0] : 64'd0));
      if (exp_out.size() > 0) void'(exp_out.pop_front());
    end
  end

  always @(negedge clk) begin
    tb_valid   = rst_n && tq.size() > 0 && (tb_valid || $urandom_range(2) != 0);
    t_data     = tq.size() > 0 ? tq[0] : '0;
    cmd_ready  = ($urandom_range(2) != 0);
    fifo_valid = fq.size() > 0 && ($urandom_range(3) != 0 || fifo_valid);
    fifo_data  = fq.size() > 0 ? fq[0] : '0;
    m_ready    = ($urandom_range(2) != 0);
  end

  initial begin
    tb_valid = 0; fifo_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (tq.size() == 0 && fq.size() == 0);
    repeat (10) @(posedge clk);
    check(exp_cmd.size() == 0, "all requests reached the MMU");
    check(exp_out.size() == 0, $sformatf("all fragments sent (%0d words left)", exp_out.size()));
    check(gotbad == nbad, $sformatf("bad requests flagged %0d of %0d", gotbad, nbad));
    check(sent_count == 32'(nsend), "sent counter");
    check(n_retry > 0, "request queue full answered with retry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
