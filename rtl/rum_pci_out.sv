// RUM output PCI interface (bus #2 target and master).
//
// Target side: takes write transactions to the RUM request window; every
// payload word is one request (ru_cmd_t): OP_SEND asks for the fragment of an
// event to be sent to the address in the request, OP_RELEASE frees its memory.
// Requests are buffered in a REQ_DEPTH-word queue; while it has no room for a
// whole transaction the interface answers with t_retry, so a request can never
// hold bus #2 while the fragments it waits for need that bus (a transaction of
// more than REQ_DEPTH requests is taken once the queue is empty and may then
// wait for room word by word).
// Requests go to the MMU; for OP_SEND the destination address is also queued
// here, since the MMU serves requests in order and the fragments leave the
// output FIFO in that same order. Unknown operations are dropped with an
// `err_bad_op` pulse.
// Master side: when the output FIFO holds an event header word and a
// destination is queued, it starts a write transaction on bus #2 to that
// destination with length 1 + word count, followed by the header word and the
// data words, up to the word marked `last`.
// The document gives this controller's place (between the output FIFO and bus
// #2) and that requested fragments are sent to the builder network; the request
// format and the transaction layout are this design's choices.
module rum_pci_out
  import ru_pkg::*;
#(
  parameter int unsigned REQ_DEPTH  = 16,
  parameter int unsigned DEST_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // bus #2, target side (requests)
  input  logic        t_valid,
  output logic        t_ready,
  output logic        t_retry,
  input  logic [63:0] t_data,
  // bus #2, master side (fragments)
  output logic        m_valid,
  input  logic        m_ready,
  output logic [63:0] m_data,
  // MMU commands
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output mmu_cmd_t    cmd,
  // output FIFO, read side
  input  logic        fifo_valid,
  output logic        fifo_ready,
  input  fifo_word_t  fifo_data,
  // status
  output logic        err_bad_op,
  output logic [31:0] sent_count
);

  localparam int unsigned DCW = $clog2(DEST_DEPTH) + 1;

  // ---- request side ----
  localparam int unsigned RCW = $clog2(REQ_DEPTH) + 1;
  logic             t_pay;
  logic [LEN_W-1:0] t_rem;
  logic             rq_in_v, rq_in_r, rq_out_v, rq_out_r;
  logic [63:0]      rq_out_d;
  logic [RCW-1:0]   rq_cnt;
  ru_cmd_t          t_req, req;
  logic             t_req_ok, req_send;
  logic             dq_in_v, dq_in_r, dq_out_v, dq_out_r;
  logic [31:0]      dq_out_d;
  logic [DCW-1:0]   dq_cnt;

  assign t_req    = ru_cmd_t'(t_data);
  assign t_req_ok = (t_req.op == OP_SEND) || (t_req.op == OP_RELEASE);

  // retry a transaction the queue cannot take whole
  always_comb begin
    if (len_of(t_data) > LEN_W'(REQ_DEPTH))
      t_retry = !t_pay && (rq_cnt != '0);
    else
      t_retry = !t_pay && (32'(len_of(t_data)) + 32'(rq_cnt) > 32'(REQ_DEPTH));
  end

  assign rq_in_v = t_pay && t_valid && t_req_ok;
  assign t_ready = t_pay ? (rq_in_r || !t_req_ok) : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_pay      <= 1'b0;
      t_rem      <= '0;
      err_bad_op <= 1'b0;
    end else begin
      err_bad_op <= 1'b0;
      if (t_valid && t_ready) begin
        if (!t_pay) begin
          if (len_of(t_data) != '0) begin
            t_pay <= 1'b1;
            t_rem <= len_of(t_data);
          end
        end else begin
          err_bad_op <= !t_req_ok;
          t_rem      <= t_rem - 1'b1;
          if (t_rem == LEN_W'(1)) t_pay <= 1'b0;
        end
      end
    end
  end

  sync_fifo #(.WIDTH(64), .DEPTH(REQ_DEPTH)) u_req_q (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rq_in_v),
    .in_ready  (rq_in_r),
    .in_data   (t_data),
    .out_valid (rq_out_v),
    .out_ready (rq_out_r),
    .out_data  (rq_out_d),
    .count     (rq_cnt)
  );

  assign req    = ru_cmd_t'(rq_out_d);
  assign req_send = (req.op == OP_SEND);

  always_comb begin
    cmd.op       = req.op;
    cmd.event_id = req.event_id;
    if (req_send) begin
      cmd_valid = rq_out_v && dq_in_r;
      dq_in_v   = rq_out_v && cmd_ready;
      rq_out_r  = cmd_ready && dq_in_r;
    end else begin
      cmd_valid = rq_out_v;
      dq_in_v   = 1'b0;
      rq_out_r  = cmd_ready;
    end
  end

  sync_fifo #(.WIDTH(32), .DEPTH(DEST_DEPTH)) u_dest_q (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dq_in_v),
    .in_ready  (dq_in_r),
    .in_data   (req.dest),
    .out_valid (dq_out_v),
    .out_ready (dq_out_r),
    .out_data  (dq_out_d),
    .count     (dq_cnt)
  );

  // ---- fragment side ----
  logic     o_body;
  pci_hdr_t o_hdr;
  ev_hdr_t  f_hdr;

  assign f_hdr = ev_hdr_t'(fifo_data.data);

  always_comb begin
    o_hdr      = '0;
    o_hdr.addr = dq_out_d;
    o_hdr.len  = LEN_W'(f_hdr.word_count) + LEN_W'(1);
    if (!o_body) begin
      m_valid    = fifo_valid && fifo_data.first && dq_out_v;
      m_data     = 64'(o_hdr);
      fifo_ready = 1'b0;
      dq_out_r   = 1'b0;
    end else begin
      m_valid    = fifo_valid;
      m_data     = fifo_data.data;
      fifo_ready = m_ready;
      dq_out_r   = fifo_valid && m_ready && fifo_data.last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_body     <= 1'b0;
      sent_count <= '0;
    end else if (m_valid && m_ready) begin
      if (!o_body) begin
        o_body <= 1'b1;
      end else if (fifo_data.last) begin
        o_body     <= 1'b0;
        sent_count <= sent_count + 1'b1;
      end
    end
  end

endmodule
