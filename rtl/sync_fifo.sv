// Synchronous first-in first-out buffer.
//
// A circular buffer of DEPTH words of WIDTH bits with a write pointer, a read
// pointer and an occupancy counter. Push and pop are valid/ready handshakes:
// in_ready is low when full, out_valid is low when empty, and a push and a pop
// may happen in the same cycle. out_data shows the oldest word combinationally
// (first-word fall-through). `count` gives the occupancy. The default size is
// the 2K x 36 bit FIFO the RUM places between its PCI interfaces and the data
// memory; the unidirectional command and data FIFOs of the bridges use the
// same module at other sizes. Reset empties the buffer.
module sync_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             push, pop;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

endmodule
