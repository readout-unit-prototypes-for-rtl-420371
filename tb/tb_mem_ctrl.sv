// Self-checking test of the memory controller with 16 blocks of 4 words, an
// 8-word output FIFO and the behavioural memory (3-cycle read latency, memory
// not ready on 20% of the cycles). The testbench plays the MMU: it grants
// blocks from a shuffled list after random delays and issues read
// descriptors. Checks: every data word lands at block * 4 + offset, the header
// handed back carries the first block, a stray data word is dropped and
// flagged, read-back reproduces header, data and the `last` mark, the output
// FIFO never overflows, and when reads and writes compete they alternate.
module tb_mem_ctrl;
  import ru_pkg::*;
  localparam int NB = 16, BW = 4, OD = 8;
  localparam int MAW = $clog2(NB * BW);

  logic clk = 0, rst_n = 0;
  logic inf_valid, inf_ready;
  fifo_word_t inf_data;
  logic alloc_req, alloc_first, alloc_gnt;
  logic [BLK_W-1:0] alloc_blk;
  logic done_valid, done_ready;
  ev_hdr_t done_hdr;
  logic rd_valid, rd_ready;
  rd_desc_t rd_desc;
  logic outf_valid, outf_ready;
  fifo_word_t outf_data;
  logic [$clog2(OD):0] outf_count;
  logic mem_req, mem_we, mem_ready, mem_rvalid;
  logic [MAW-1:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata;
  logic wr_stall_nomem, err_stray_word;
  int checks = 0, failures = 0;

  mem_ctrl #(.NBLK(NB), .BLOCK_WORDS(BW), .OUT_DEPTH(OD)) dut (.*);

  dimm_model #(.AW(MAW), .LAT(3), .STALL_PCT(20)) u_mem (.*);

  logic ov, or_;
  fifo_word_t od;
  logic [$clog2(OD):0] ocnt_unused;
  sync_fifo #(.WIDTH(72), .DEPTH(OD)) u_out (
    .clk, .rst_n,
    .in_valid (outf_valid), .in_ready (outf_ready), .in_data (outf_data),
    .out_valid (ov), .out_ready (or_), .out_data (od), .count (outf_count));
  assign ocnt_unused = outf_count;

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

  function automatic logic [63:0] dword(int id, int k);
    return {16'hD000 + 16'(id), 16'(k), 32'hC0DE0000 ^ 32'(id * 131 + k)};
  endfunction

  // ---- MMU stand-in: allocation ----
  int blks [NB] = '{5, 2, 9, 14, 0, 7, 11, 3, 12, 1, 6, 15, 8, 4, 13, 10};
  int nalloc = 0;
  int ev_blocks [int][$];   // event id -> blocks it got
  int cur_id;
  always @(negedge clk) begin
    alloc_gnt = 1'b0;
    alloc_blk = '0;
    if (rst_n && alloc_req && $urandom_range(2) == 0) begin
      alloc_gnt = 1'b1;
      alloc_blk = BLK_W'(blks[nalloc % NB]);
    end
  end
  always @(posedge clk) if (rst_n && alloc_req && alloc_gnt) nalloc++;

  // ---- MMU stand-in: stored headers ----
  ev_hdr_t stored [$];
  always @(posedge clk) if (rst_n && done_valid && done_ready) stored.push_back(done_hdr);
  always @(negedge clk) done_ready = ($urandom_range(1) == 0);

  // ---- memory write checker ----
  logic [63:0] expect_mem [int];
  int n_wr = 0;
  always @(posedge clk) if (rst_n && mem_req && mem_ready && mem_we) begin
    check(expect_mem.exists(int'(mem_addr)), $sformatf("write to unexpected address %0d", mem_addr));
    if (expect_mem.exists(int'(mem_addr)))
      check(expect_mem[int'(mem_addr)] == mem_wdata, $sformatf("write data at %0d", mem_addr));
    n_wr++;
  end

  // ---- arbitration fairness ----
  int both = 0, both_w = 0, both_r = 0;
  always @(posedge clk) if (rst_n && dut.wr_want && dut.rd_want && mem_ready) begin
    both++;
    if (dut.wr_go) both_w++;
    if (dut.rd_go) both_r++;
  end
  int n_stray = 0;
  always @(posedge clk) if (rst_n && err_stray_word) n_stray++;

  // ---- output collector ----
  fifo_word_t outq [$];
  always @(posedge clk) if (rst_n && ov && or_) outq.push_back(od);
  always @(negedge clk) or_ = ($urandom_range(3) != 0);

  // send one fragment into the input side
  task automatic send_frag(input int id, input int wc);
    ev_hdr_t h;
    h = '0;
    h.event_id = EVID_W'(id);
    h.word_count = WC_W'(wc);
    h.status = 8'h3C;
    @(negedge clk);
    inf_valid = 1; inf_data = '0; inf_data.first = 1; inf_data.data = 64'(h);
    @(posedge clk); while (!inf_ready) @(posedge clk);
    for (int k = 0; k < wc; k++) begin
      @(negedge clk);
      inf_data = '0; inf_data.data = dword(id, k);
      @(posedge clk); while (!inf_ready) @(posedge clk);
    end
    @(negedge clk); inf_valid = 0;
  endtask

  // expected addresses for a fragment given the block list
  task automatic plan_frag(input int id, input int wc, input int first_alloc);
    int nb;
    nb = (wc + BW - 1) / BW;
    if (nb == 0) nb = 1;
    ev_blocks[id] = {};
    for (int j = 0; j < nb; j++) ev_blocks[id].push_back(blks[(first_alloc + j) % NB]);
    for (int k = 0; k < wc; k++)
      expect_mem[ev_blocks[id][k / BW] * BW + k % BW] = dword(id, k);
  endtask

  task automatic read_event(input int id, input int wc, input ev_hdr_t hdr);
    int nb, rem;
    nb = ev_blocks[id].size();
    rem = wc;
    for (int j = 0; j < nb; j++) begin
      @(negedge clk);
      rd_valid = 1;
      rd_desc = '0;
      rd_desc.first = (j == 0);
      rd_desc.last = (j == nb - 1);
      rd_desc.hdr = hdr;
      rd_desc.blk = BLK_W'(ev_blocks[id][j]);
      rd_desc.nwords = WC_W'((rem > BW) ? BW : rem);
      rem -= BW;
      @(posedge clk); while (!rd_ready) @(posedge clk);
      @(negedge clk); rd_valid = 0;
    end
  endtask

  task automatic check_out(input int id, input int wc, input ev_hdr_t hdr);
    int t;
    t = 0;
    while (outq.size() < wc + 1 && t < 2000) begin @(posedge clk); t++; end
    check(outq.size() >= wc + 1, $sformatf("event %0d: %0d words out", id, outq.size()));
    if (outq.size() >= wc + 1) begin
      fifo_word_t w;
      w = outq.pop_front();
      check(w.first && w.data == 64'(hdr) && (w.last == (wc == 0)), $sformatf("event %0d header word", id));
      for (int k = 0; k < wc; k++) begin
        w = outq.pop_front();
        check(!w.first && w.data == dword(id, k) && (w.last == (k == wc - 1)),
              $sformatf("event %0d word %0d", id, k));
      end
    end
  endtask

  ev_hdr_t h1, h2, h3, h4;

  initial begin
    inf_valid = 0; inf_data = '0; rd_valid = 0; rd_desc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // a stray data word without header
    @(negedge clk);
    inf_valid = 1; inf_data = '0; inf_data.data = 64'hBAD;
    @(posedge clk); while (!inf_ready) @(posedge clk);
    @(negedge clk); inf_valid = 0;
    repeat (2) @(posedge clk);
    check(n_stray == 1, "stray word flagged");

    plan_frag(1, 9, 0);  send_frag(1, 9);
    plan_frag(2, 0, 3);  send_frag(2, 0);
    plan_frag(3, 4, 4);  send_frag(3, 4);
    repeat (20) @(posedge clk);
    check(stored.size() == 3, $sformatf("3 headers stored, got %0d", stored.size()));
    check(n_wr == 13, $sformatf("13 memory writes, got %0d", n_wr));
    if (stored.size() == 3) begin
      h1 = stored[0]; h2 = stored[1]; h3 = stored[2];
      check(h1.event_id == 1 && h1.word_count == 9 && h1.first_blk == 5 && h1.status == 8'h3C, "header 1");
      check(h2.event_id == 2 && h2.word_count == 0 && h2.first_blk == 14, "header 2");
      check(h3.event_id == 3 && h3.word_count == 4 && h3.first_blk == 0, "header 3");
    end

    read_event(1, 9, h1); check_out(1, 9, h1);
    read_event(2, 0, h2); check_out(2, 0, h2);
    read_event(3, 4, h3); check_out(3, 4, h3);

    // write event 4 while reading event 1 again
    plan_frag(4, 12, 5);
    fork
      send_frag(4, 12);
      read_event(1, 9, h1);
    join
    check_out(1, 9, h1);
    repeat (20) @(posedge clk);
    check(stored.size() == 4, "4 headers stored");
    if (stored.size() == 4) begin
      h4 = stored[3];
      check(h4.first_blk == 7, "header 4 first block");
      read_event(4, 12, h4); check_out(4, 12, h4);
    end
    check(both > 0, $sformatf("reads and writes competed (%0d cycles)", both));
    check(both_w - both_r <= 1 && both_r - both_w <= 1,
          $sformatf("arbiter alternates: %0d writes, %0d reads", both_w, both_r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the output FIFO must never be offered a word it cannot take
  always @(posedge clk) if (rst_n && outf_valid) begin
    checks++;
    if (!outf_ready) begin failures++; $display("FAIL: output FIFO overflow"); end
  end
endmodule
