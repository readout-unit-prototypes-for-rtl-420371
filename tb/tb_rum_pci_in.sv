// Self-checking test of the RUM input interface: random transactions (some
// empty) arrive with random gaps while the FIFO side applies random
// back-pressure. Checks that exactly the payload words come out, the first of
// each transaction marked, and that the fragment counter counts transactions
// with payload.
module tb_rum_pci_in;
  import ru_pkg::*;
  logic clk = 0, rst_n = 0;
  logic t_valid, t_ready, fifo_valid, fifo_ready;
  logic [63:0] t_data;
  fifo_word_t fifo_data;
  logic [31:0] frag_count;
  int checks = 0, failures = 0;

  rum_pci_in dut (.*);

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

  logic [63:0] inq [$];
  fifo_word_t  expq [$];
  int nfrag = 0;

  initial begin
    for (int p = 0; p < 200; p++) begin
      pci_hdr_t h;
      int len;
      len = ($urandom_range(5) == 0) ? 0 : $urandom_range(1, 20);
      h = '0;
      h.addr = {REG_RUM_IN, 28'(p)};
      h.len = 16'(len);
      inq.push_back(64'(h));
      if (len != 0) nfrag++;
      for (int k = 0; k < len; k++) begin
        fifo_word_t w;
        w = '0;
        w.first = (k == 0);
        w.data = {32'(p), 32'(k)};
        inq.push_back(w.data);
        expq.push_back(w);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (t_valid && t_ready) void'(inq.pop_front());
    if (fifo_valid && fifo_ready) begin
      check(expq.size() > 0, "unexpected word");
      if (expq.size() > 0) begin
        check(fifo_data == expq[0], $sformatf("word %h exp %h", fifo_data, expq[0]));
        void'(expq.pop_front());
      end
    end
  end

  always @(negedge clk) begin
    t_valid    = rst_n && inq.size() > 0 && (t_valid || $urandom_range(3) != 0);
    t_data     = inq.size() > 0 ? inq[0] : '0;
    fifo_ready = ($urandom_range(2) != 0);
  end

  initial begin
    t_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (inq.size() == 0);
    repeat (5) @(posedge clk);
    check(expq.size() == 0, "all payload words delivered");
    check(frag_count == 32'(nfrag), $sformatf("fragment count %0d exp %0d", frag_count, nfrag));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
