// Self-checking test of rr_arbiter (N = 4): grants are one-hot, follow the
// round-robin order from the last grant, and stay put while `hold` is high.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic hold;
  int checks = 0, failures = 0;
  int last_m;
  logic [N-1:0] exp_gnt;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  function automatic logic [N-1:0] pick(input logic [N-1:0] r, input int last);
    for (int k = 1; k <= N; k++)
      if (r[(last + k) % N]) return N'(1) << ((last + k) % N);
    return '0;
  endfunction

  initial begin
    req = '0; hold = 0; last_m = N - 1; exp_gnt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // all requesting: strict rotation 0,1,2,3,0,...
    @(negedge clk); req = '1;
    for (int c = 0; c < 8; c++) begin
      @(posedge clk); #1;
      checks++;
      if (gnt !== (N'(1) << (c % N))) begin
        failures++; $display("FAIL: rotation %0d gnt=%b", c, gnt);
      end
    end
    last_m = 3;
    @(negedge clk); req = '0; hold = 0;
    @(posedge clk); #1; last_m = 3;
    // random requests and holds
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      req  = N'($urandom);
      hold = (gnt != 0) && ($urandom_range(2) == 0);
      exp_gnt = hold ? gnt : pick(req, last_m);
      @(posedge clk); #1;
      checks++;
      if (gnt !== exp_gnt) begin
        failures++; $display("FAIL: cycle %0d req=%b hold=%b gnt=%b exp=%b", c, req, hold, gnt, exp_gnt);
      end
      if (!hold && exp_gnt != 0) for (int i = 0; i < N; i++) if (exp_gnt[i]) last_m = i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
