// Full-size run of the Readout Unit: every parameter at its default (512 MByte
// data memory in 131072 blocks of 4 KByte, 131072-entry event table, 2K-word
// port FIFOs). After the start-up fill of the free page queue, the FED card
// writes one 4 KByte fragment (header + 511 data words), the BDN card asks for
// it and receives it intact from the builder-network side, and a release
// returns every block. Also checks that the fragment occupies exactly one
// block and that the start-up takes one cycle per block.
// Second phase, the design's target load: NSTREAM further 4 KByte fragments
// are written back to back by the FED card while the BDN card requests each
// one (send, then release, in one transaction) as soon as it is stored. Every
// word received is checked, and the input and output rates are measured in
// 64-bit words per clock: 4 KByte at 100 kHz is 51.2 M words/s, which at a
// 133 MHz clock is 0.385 words per cycle, needed in each direction at once.
module tb_ru_full;
  import ru_pkg::*;
  localparam int NB = 131072, WC = 511, NSTREAM = 24;
  localparam real NEED = 51.2e6 / 133.0e6;   // words per cycle per direction

  logic clk = 0, rst_n = 0;
  logic host_m_valid = 0, host_t_ready = 1;
  logic [63:0] host_m_data = '0;
  logic host_m_ready, host_t_valid;
  logic [63:0] host_t_data;
  logic fed_m_valid, fed_m_ready, fed_t_valid, fed_t_ready = 1;
  logic [63:0] fed_m_data, fed_t_data;
  logic bdn_m_valid, bdn_m_ready, bdn_t_valid, bdn_t_ready = 1;
  logic [63:0] bdn_m_data, bdn_t_data;
  logic [2:0] lb_in_valid = '0, lb_in_ready, lb_out_valid, lb_out_ready = '1;
  logic [2:0][31:0] lb_in_data = '0, lb_out_data;
  logic mem_req, mem_we, mem_ready, mem_rvalid;
  logic [25:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata;
  logic init_done, stall_nomem, bus2_retry;
  logic [17:0] free_blocks;
  logic [31:0] frags_in, frags_out;
  logic [7:0] errors;
  int checks = 0, failures = 0;

  ru_top dut (.*);

  dimm_model #(.AW(26), .LAT(3), .STALL_PCT(5)) u_mem (.*);

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

  function automatic logic [63:0] dword(int k);
    return {32'hF00D0000 + 32'(k), 32'(k * 2654435761)};
  endfunction


  logic [63:0] fq [$], bq [$], rx [$];
  always @(posedge clk) if (rst_n) begin
    if (fed_m_valid && fed_m_ready) void'(fq.pop_front());
    if (bdn_m_valid && bdn_m_ready) void'(bq.pop_front());
    if (bdn_t_valid && bdn_t_ready) rx.push_back(bdn_t_data);
  end
  always @(negedge clk) begin
    fed_m_valid = rst_n && fq.size() > 0;
    fed_m_data  = fq.size() > 0 ? fq[0] : '0;
    bdn_m_valid = rst_n && bq.size() > 0;
    bdn_m_data  = bq.size() > 0 ? bq[0] : '0;
  end

  int t0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic logic [63:0] sword(int id, int k);
    return {8'(id), 24'(k), 32'(k * 40503 + id * 977)};
  endfunction

  task automatic push_frag(int id);
    pci_hdr_t ph;
    ev_hdr_t  eh;
    ph = '0; ph.addr = {REG_RUM_IN, 28'd0}; ph.len = 16'(WC + 1);
    eh = '0; eh.event_id = EVID_W'(id); eh.word_count = WC_W'(WC); eh.status = 8'h02;
    fq.push_back(64'(ph));
    fq.push_back(64'(eh));
    for (int k = 0; k < WC; k++) fq.push_back(sword(id, k));
  endtask
  pci_hdr_t h;
  int t_in0, t_in1, t_out0, t_out1;
  real r_in, r_out;
  ev_hdr_t e, eo;
  ru_cmd_t c;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = 0;
    while (!init_done) begin @(posedge clk); t0++; end
    check(t0 == NB, $sformatf("start-up %0d cycles", t0));
    check(free_blocks == NB, "all blocks free");

    // one 4 KByte fragment from the FED card
    h = '0; h.addr = {REG_RUM_IN, 28'd0}; h.len = 16'(WC + 1);
    e = '0; e.event_id = 24'h00ABCD; e.word_count = WC_W'(WC); e.status = 8'h01;
    fq.push_back(64'(h));
    fq.push_back(64'(e));
    for (int k = 0; k < WC; k++) fq.push_back(dword(k));
    t0 = 0;
    while (frags_in == 0 || dut.u_mmu.et[24'h00ABCD % NB].valid == 0) begin @(posedge clk); t0++; end
    repeat (5) @(posedge clk);
    check(free_blocks == NB - 1, "fragment takes one block");

    // request it from the BDN card
    h = '0; h.addr = {REG_RUM_CMD, 28'd0}; h.len = 16'd1;
    c = '0; c.op = OP_SEND; c.event_id = 24'h00ABCD; c.dest = {REG_BDN, 28'h0000100};
    bq.push_back(64'(h));
    bq.push_back(64'(c));
    t0 = 0;
    while (rx.size() < WC + 2 && t0 < 20000) begin @(posedge clk); t0++; end
    check(rx.size() == WC + 2, $sformatf("received %0d words", rx.size()));
    if (rx.size() == WC + 2) begin
      h = pci_hdr_t'(rx[0]);
      eo = ev_hdr_t'(rx[1]);
      check(h.addr == c.dest && h.len == 16'(WC + 1), "transaction header");
      check(eo.event_id == e.event_id && eo.word_count == e.word_count && eo.status == e.status,
            "event header");
      for (int k = 0; k < WC; k++) check(rx[k + 2] == dword(k), $sformatf("data word %0d", k));
    end

    // release
    c.op = OP_RELEASE;
    bq.push_back(64'(h_cmd()));
    bq.push_back(64'(c));
    repeat (50) @(posedge clk);
    check(free_blocks == NB, "block returned");
    check(errors == 0, "no error flags");

    // ---- phase 2: streaming load ----
    rx = {};
    t_in0 = cyc;
    for (int i = 0; i < NSTREAM; i++) push_frag(16'h100 + i);
    fork
      begin : requester
        for (int i = 0; i < NSTREAM; i++) begin
          pci_hdr_t rh;
          ru_cmd_t  rc;
          while (dut.u_mmu.et[(16'h100 + i) % NB].valid == 0) @(posedge clk);
          if (i == NSTREAM - 1) t_in1 = cyc;
          rh = '0; rh.addr = {REG_RUM_CMD, 28'd0}; rh.len = 16'd2;
          rc = '0; rc.op = OP_SEND; rc.event_id = EVID_W'(16'h100 + i); rc.dest = {REG_BDN, 28'h0000200};
          bq.push_back(64'(rh));
          bq.push_back(64'(rc));
          rc.op = OP_RELEASE;
          bq.push_back(64'(rc));
        end
      end
      begin : receiver
        t0 = 0;
        while (rx.size() == 0) @(posedge clk);
        t_out0 = cyc;
        while (rx.size() < NSTREAM * (WC + 2) && t0 < 100000) begin @(posedge clk); t0++; end
        t_out1 = cyc;
      end
    join
    check(rx.size() == NSTREAM * (WC + 2), $sformatf("stream: received %0d words", rx.size()));
    if (rx.size() == NSTREAM * (WC + 2)) begin
      int bad;
      bad = 0;
      for (int i = 0; i < NSTREAM; i++) begin
        int b;
        b = i * (WC + 2);
        h  = pci_hdr_t'(rx[b]);
        eo = ev_hdr_t'(rx[b + 1]);
        check(h.len == 16'(WC + 1) && eo.event_id == EVID_W'(16'h100 + i) && eo.word_count == WC_W'(WC),
              $sformatf("stream fragment %0d header", i));
        for (int k = 0; k < WC; k++) if (rx[b + 2 + k] != sword(16'h100 + i, k)) bad++;
        check(bad == 0, $sformatf("stream fragment %0d data (%0d bad words so far)", i, bad));
      end
    end
    repeat (100) @(posedge clk);
    check(free_blocks == NB, "stream: all blocks returned");
    check(errors == 0, "stream: no error flags");
    r_in  = real'(NSTREAM * (WC + 1)) / real'(t_in1 - t_in0);
    r_out = real'(NSTREAM * (WC + 1)) / real'(t_out1 - t_out0);
    $display("stream: in %0d words in %0d cycles (%.3f/cycle), out %0d words in %0d cycles (%.3f/cycle), need %.3f",
             NSTREAM * (WC + 1), t_in1 - t_in0, r_in, NSTREAM * (WC + 1), t_out1 - t_out0, r_out, NEED);
    check(r_in >= NEED, "input rate reaches 4 KByte x 100 kHz");
    check(r_out >= NEED, "output rate reaches 4 KByte x 100 kHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pci_hdr_t h_cmd();
    pci_hdr_t x;
    x = '0; x.addr = {REG_RUM_CMD, 28'd0}; x.len = 16'd1;
    return x;
  endfunction
endmodule
