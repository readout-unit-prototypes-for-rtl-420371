// Self-checking test of sync_fifo at its default size (2048 x 36).
// Random pushes and pops against a queue model; also fills the FIFO
// completely, checks that it refuses a further word, and drains it.
module tb_sync_fifo;
  localparam int W = 36, D = 2048;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sync_fifo dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard on every clock edge
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      check(model.size() > 0, "pop from empty model");
      if (model.size() > 0) begin
        check(out_data == model[0], $sformatf("data %h expected %h", out_data, model[0]));
        void'(model.pop_front());
      end
    end
    if (in_valid && in_ready) model.push_back(in_data);
  end

  always @(negedge clk) if (rst_n)
    check(int'(count) == model.size(), $sformatf("count %0d model %0d", count, model.size()));

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random phase
    repeat (20000) begin
      @(negedge clk);
      in_valid  = ($urandom_range(3) != 0);
      in_data   = {$urandom, $urandom} ;
      out_ready = ($urandom_range(2) == 0);
    end
    // fill
    @(negedge clk);
    out_ready = 0;
    in_valid  = 1;
    while (in_ready) begin
      in_data = {$urandom, $urandom};
      @(negedge clk);
    end
    check(count == ($clog2(D)+1)'(D), "full at DEPTH");
    check(!in_ready, "in_ready low when full");
    in_valid = 0;
    out_ready = 1;
    while (out_valid) @(negedge clk);
    check(count == 0, "empty after drain");
    check(model.size() == 0, "model empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
