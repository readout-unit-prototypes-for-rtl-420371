// Self-checking test of the MMU with 16 blocks of 4 words and a 16-entry
// event table. Checks the free page queue start-up, allocation order, block
// chaining (read descriptors of a three-block event), a zero-length event,
// a request for an unknown event, release (blocks return to the queue),
// release of an unknown event, the stall when memory is full and its end on
// release, and the event-table collision flag.
module tb_mmu;
  import ru_pkg::*;
  localparam int NB = 16, BW = 4, ED = 16;

  logic clk = 0, rst_n = 0;
  logic init_done, alloc_req, alloc_first, alloc_gnt;
  logic [BLK_W-1:0] alloc_blk;
  logic done_valid, done_ready;
  ev_hdr_t done_hdr;
  logic cmd_valid, cmd_ready;
  mmu_cmd_t cmd;
  logic rd_valid, rd_ready;
  rd_desc_t rd_desc;
  logic [$clog2(NB):0] free_count;
  logic err_collision, err_release_missing;
  int checks = 0, failures = 0;
  int n_coll = 0, n_relmiss = 0;

  mmu #(.NBLK(NB), .BLOCK_WORDS(BW), .ET_DEPTH(ED)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && err_collision) n_coll++;
    if (rst_n && err_release_missing) n_relmiss++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic alloc(input bit first, output int blk);
    @(negedge clk);
    alloc_req = 1; alloc_first = first;
    @(posedge clk);
    while (!alloc_gnt) @(posedge clk);
    blk = int'(alloc_blk);
    @(negedge clk);
    alloc_req = 0;
  endtask

  task automatic done(input int id, input int wc, input int first);
    @(negedge clk);
    done_valid = 1;
    done_hdr = '0;
    done_hdr.event_id = EVID_W'(id);
    done_hdr.word_count = WC_W'(wc);
    done_hdr.first_blk = BLK_W'(first);
    done_hdr.status = 8'h11;
    @(posedge clk);
    while (!done_ready) @(posedge clk);
    @(negedge clk);
    done_valid = 0;
  endtask

  task automatic command(input ru_op_e op, input int id);
    @(negedge clk);
    cmd_valid = 1; cmd.op = op; cmd.event_id = EVID_W'(id);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  rd_desc_t got [$];
  always @(posedge clk) if (rst_n && rd_valid && rd_ready) got.push_back(rd_desc);
  always @(negedge clk) rd_ready = ($urandom_range(2) != 0);

  int b [8];
  int t0, tmp;

  initial begin
    alloc_req = 0; alloc_first = 0; done_valid = 0; done_hdr = '0;
    cmd_valid = 0; cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    t0 = 0;
    while (!init_done) begin @(posedge clk); t0++; end
    check(t0 == NB, $sformatf("start-up took %0d cycles, expected %0d", t0, NB));
    check(free_count == NB, "all blocks free after start-up");

    // event 5, 10 words: three blocks 0,1,2
    alloc(1, b[0]); alloc(0, b[1]); alloc(0, b[2]);
    check(b[0] == 0 && b[1] == 1 && b[2] == 2, "allocation order 0,1,2");
    done(5, 10, b[0]);
    // event 6, zero words: one block
    alloc(1, b[3]);
    check(b[3] == 3, "block 3 for event 6");
    done(6, 0, b[3]);
    check(free_count == NB - 4, "12 blocks free");

    // send event 5
    command(OP_SEND, 5);
    repeat (12) @(posedge clk);
    check(got.size() == 3, $sformatf("3 descriptors, got %0d", got.size()));
    if (got.size() == 3) begin
      check(got[0].first && !got[0].last && got[0].blk == 0 && got[0].nwords == 4, "descriptor 0");
      check(got[0].hdr.event_id == 5 && got[0].hdr.word_count == 10 &&
            got[0].hdr.first_blk == 0 && got[0].hdr.status == 8'h11, "header of event 5");
      check(!got[1].first && !got[1].last && got[1].blk == 1 && got[1].nwords == 4, "descriptor 1");
      check(!got[2].first && got[2].last && got[2].blk == 2 && got[2].nwords == 2, "descriptor 2");
    end
    got.delete();

    // send event 6 (zero words) and unknown event 7
    command(OP_SEND, 6);
    command(OP_SEND, 7);
    repeat (8) @(posedge clk);
    check(got.size() == 2, "2 descriptors for events 6 and 7");
    if (got.size() == 2) begin
      check(got[0].first && got[0].last && got[0].nwords == 0 && got[0].blk == 3 &&
            got[0].hdr.status == 8'h11, "event 6 descriptor");
      check(got[1].first && got[1].last && got[1].nwords == 0 &&
            got[1].hdr.status == 8'h80 && got[1].hdr.event_id == 7, "event 7 reported missing");
    end
    got.delete();

    // release event 5 and unknown 9
    command(OP_RELEASE, 5);
    repeat (5) @(posedge clk);
    check(free_count == NB - 1, "three blocks back after release");
    command(OP_SEND, 5);
    repeat (5) @(posedge clk);
    check(got.size() == 1 && got[0].hdr.status == 8'h80, "released event is gone");
    got.delete();
    command(OP_RELEASE, 9);
    repeat (3) @(posedge clk);
    check(n_relmiss == 1, "release of unknown event flagged");

    // collision: event 22 maps onto the entry of event 6
    alloc(1, b[4]);
    check(b[4] == 4, "next block from the queue is 4");
    done(22, 1, b[4]);
    repeat (2) @(posedge clk);
    check(n_coll == 1, "collision flagged");

    // fill the memory: 14 blocks left
    tmp = int'(free_count);
    check(tmp == NB - 2, "14 blocks free");
    for (int k = 0; k < tmp; k++) begin
      int x;
      alloc(k == 0, x);
      if (k == tmp - 1) check(x == 2, "the released blocks come last (FIFO order)");
    end
    check(free_count == 0, "memory full");
    // a further request stalls ...
    @(negedge clk);
    alloc_req = 1; alloc_first = 1;
    repeat (5) begin @(posedge clk); check(!alloc_gnt, "no grant while full"); end
    // ... until memory is released
    command(OP_RELEASE, 22);
    t0 = 0;
    while (!alloc_gnt && t0 < 10) begin @(posedge clk); t0++; end
    check(alloc_gnt && alloc_blk == 4, $sformatf("stall ends with the released block (gnt %0d blk %0d t %0d)", alloc_gnt, alloc_blk, t0));
    @(negedge clk); alloc_req = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
