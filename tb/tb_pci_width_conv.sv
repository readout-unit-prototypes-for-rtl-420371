// Testbench of pci_width_conv, the 64/32-bit converter of the local buses.
//
// Down path: random 64-bit words enter with random valid gaps; the narrow
// side, ready at random, must see each word as its low half, then its high
// half, in order, with nothing lost or repeated. Up path: random 32-bit
// phases enter; each pair must leave as one 64-bit word {second, first}.
// Both paths run at the same time. Also checks that a wide word is taken only
// after its second phase, that the narrow side sees two phases per word in
// total, and that, with every valid and ready held high, each path moves one
// narrow phase every cycle (no bubbles). A watchdog ends a hung run.
module tb_pci_width_conv;
  localparam int NW = 3000;

  logic clk = 0, rst_n = 0;
  logic        w_in_valid, w_in_ready, n_out_valid, n_out_ready;
  logic [63:0] w_in_data;
  logic [31:0] n_out_data;
  logic        n_in_valid, n_in_ready, w_out_valid, w_out_ready;
  logic [31:0] n_in_data;
  logic [63:0] w_out_data;
  int checks = 0, failures = 0;

  pci_width_conv dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40 * NW) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus and expectations
  logic [63:0] dq [$];     // wide words still to send down
  logic [31:0] dexp [$];   // narrow phases expected on n_out
  logic [31:0] uq [$];     // narrow phases still to send up
  logic [63:0] uexp [$];   // wide words expected on w_out
  bit full_rate = 0;
  int n_dn = 0, n_up = 0, n_wtaken = 0;

  always @(negedge clk) begin
    w_in_valid  = rst_n && dq.size() > 0 && (w_in_valid || full_rate || $urandom_range(3) != 0);
    w_in_data   = dq.size() > 0 ? dq[0] : 64'd0;
    n_in_valid  = rst_n && uq.size() > 0 && (n_in_valid || full_rate || $urandom_range(3) != 0);
    n_in_data   = uq.size() > 0 ? uq[0] : 32'd0;
    n_out_ready = full_rate || ($urandom_range(2) != 0);
    w_out_ready = full_rate || ($urandom_range(2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (w_in_valid && w_in_ready) begin void'(dq.pop_front()); n_wtaken++; end
    if (n_in_valid && n_in_ready) void'(uq.pop_front());
    if (n_out_valid && n_out_ready) begin
      n_dn++;
      check(dexp.size() > 0 && n_out_data == dexp[0],
            $sformatf("down phase %0d: got %h", n_dn, n_out_data));
      if (dexp.size() > 0) void'(dexp.pop_front());
      // the wide word is consumed exactly on its second phase
      check(w_in_ready == (n_dn % 2 == 0), $sformatf("down phase %0d: wide ready", n_dn));
    end
    if (w_out_valid && w_out_ready) begin
      n_up++;
      check(uexp.size() > 0 && w_out_data == uexp[0],
            $sformatf("up word %0d: got %h", n_up, w_out_data));
      if (uexp.size() > 0) void'(uexp.pop_front());
    end
  end

  task automatic load(int n);
    for (int i = 0; i < n; i++) begin
      logic [63:0] w;
      logic [31:0] a, b;
      w = {$urandom(), $urandom()};
      dq.push_back(w);
      dexp.push_back(w[31:0]);
      dexp.push_back(w[63:32]);
      a = $urandom(); b = $urandom();
      uq.push_back(a);
      uq.push_back(b);
      uexp.push_back({b, a});
    end
  endtask

  int t0, d0, u0;

  initial begin
    w_in_valid = 0; n_in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // random traffic both ways
    load(NW);
    t0 = 0;
    while ((dexp.size() > 0 || uexp.size() > 0) && t0 < 30 * NW) begin @(posedge clk); t0++; end
    check(dexp.size() == 0 && uexp.size() == 0, "all random traffic delivered");
    check(n_dn == 2 * NW && n_wtaken == NW, $sformatf("down: %0d phases for %0d words", n_dn, n_wtaken));
    check(n_up == NW, $sformatf("up: %0d words", n_up));

    // full rate: one narrow phase per cycle each way
    repeat (2) @(negedge clk);
    full_rate = 1;
    d0 = n_dn; u0 = n_up;
    load(100);
    @(posedge clk);
    t0 = 0;
    while ((dexp.size() > 0 || uexp.size() > 0) && t0 < 1000) begin @(posedge clk); t0++; end
    check(n_dn - d0 == 200 && n_up - u0 == 100, "full-rate traffic delivered");
    check(t0 <= 202, $sformatf("full rate: 200 phases took %0d cycles", t0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
