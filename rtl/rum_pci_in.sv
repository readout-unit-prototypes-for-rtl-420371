// RUM input PCI interface (bus #1 target).
//
// Takes the write transactions that the input RUIO's front-end card sends to
// the RUM input window. The PCI header word is consumed; the payload, which is
// one event fragment (an event header word followed by its data words), is
// pushed into the input FIFO with the first payload word marked as the event
// header. A transaction with no payload is consumed and ignored. Payload words
// wait while the FIFO is full, which stalls the bus (the target-retry of a real
// PCI bus). `frag_count` counts received fragments. The document names this
// interface controller and its place between bus #1 and the FIFO; the
// one-fragment-per-transaction rule is this design's choice.
module rum_pci_in
  import ru_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // bus #1, target side
  input  logic        t_valid,
  output logic        t_ready,
  input  logic [63:0] t_data,
  // input FIFO, write side
  output logic        fifo_valid,
  input  logic        fifo_ready,
  output fifo_word_t  fifo_data,
  // status
  output logic [31:0] frag_count
);

  logic             in_pay;
  logic             first_q;
  logic [LEN_W-1:0] rem;

  always_comb begin
    fifo_data       = '0;
    fifo_data.first = first_q;
    fifo_data.data  = t_data;
    fifo_valid      = in_pay && t_valid;
    t_ready         = in_pay ? fifo_ready : 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pay     <= 1'b0;
      first_q    <= 1'b0;
      rem        <= '0;
      frag_count <= '0;
    end else if (t_valid && t_ready) begin
      if (!in_pay) begin
        if (len_of(t_data) != '0) begin
          in_pay     <= 1'b1;
          first_q    <= 1'b1;
          rem        <= len_of(t_data);
          frag_count <= frag_count + 1'b1;
        end
      end else begin
        first_q <= 1'b0;
        rem     <= rem - 1'b1;
        if (rem == LEN_W'(1)) in_pay <= 1'b0;
      end
    end
  end

endmodule
