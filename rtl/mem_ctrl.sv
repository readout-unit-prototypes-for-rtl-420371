// Memory Controller (MC) of the Readout Unit Memory board.
//
// Turns logical event data (block numbers from the MMU, words from the PCI
// port FIFOs) into physical memory accesses. Physical word address =
// block * BLOCK_WORDS + offset, the offset coming from the write counter (WCR)
// or the read counter (RCR).
// Write port state machine: takes an event header word from the input FIFO,
// asks the MMU for a first block, writes the fragment's data words to memory,
// asks for a further block whenever one fills, and finally hands the header,
// completed with the first block number, back to the MMU.
// Read port state machine: takes read descriptors from the MMU; for the first
// block of an event it puts the header word into the output FIFO, then reads
// the block's words. It only issues a read when the output FIFO has room for
// it and for every read still in flight, so returning data is never lost; it
// waits for all of a block's data before taking the next descriptor. The last
// data word of an event is marked `last`.
// Arbiter: one memory access per cycle; when both state machines want the
// memory they take turns word by word, so each direction gets at least half of
// the memory bandwidth. The memory port is a plain request/ready port with
// read data returned later with `mem_rvalid`, in order; an SDRAM controller
// (refresh, row activation, burst setup) would sit behind it and shows up only
// as cycles with `mem_ready` low.
// The counters, the arbiter, the two port state machines and the FIFO control
// follow the document's memory-controller diagram; their exact behaviour and
// the memory port are this design's choices. That diagram labels the machine
// at the input FIFO "READ port" (with RCR) and the one at the output FIFO
// "WRITE port" (with WCR), seen from the PCI side; here both are named after
// their memory operation instead.
module mem_ctrl
  import ru_pkg::*;
#(
  parameter int unsigned NBLK        = 131072,
  parameter int unsigned BLOCK_WORDS = 512,
  parameter int unsigned OUT_DEPTH   = 2048,
  localparam int unsigned MAW        = $clog2(NBLK * BLOCK_WORDS),
  localparam int unsigned OCW        = $clog2(OUT_DEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // input FIFO, read side
  input  logic             inf_valid,
  output logic             inf_ready,
  input  fifo_word_t       inf_data,
  // MMU input sequencer
  output logic             alloc_req,
  output logic             alloc_first,
  input  logic             alloc_gnt,
  input  logic [BLK_W-1:0] alloc_blk,
  output logic             done_valid,
  input  logic             done_ready,
  output ev_hdr_t          done_hdr,
  // MMU output sequencer
  input  logic             rd_valid,
  output logic             rd_ready,
  input  rd_desc_t         rd_desc,
  // output FIFO, write side
  output logic             outf_valid,
  input  logic             outf_ready,
  output fifo_word_t       outf_data,
  input  logic [OCW-1:0]   outf_count,
  // memory
  output logic             mem_req,
  output logic             mem_we,
  output logic [MAW-1:0]   mem_addr,
  output logic [63:0]      mem_wdata,
  input  logic             mem_ready,
  input  logic             mem_rvalid,
  input  logic [63:0]      mem_rdata,
  // status
  output logic             wr_stall_nomem,   // waiting for a free block
  output logic             err_stray_word    // data word without a header, dropped
);

  localparam int unsigned BOW = $clog2(BLOCK_WORDS);

  typedef enum logic [1:0] {W_IDLE, W_ALLOC, W_DATA, W_DONE} wstate_e;
  typedef enum logic [1:0] {R_IDLE, R_HDR, R_DATA, R_DRAIN} rstate_e;

  // ---- write port ----
  wstate_e          wst;
  ev_hdr_t          w_hdr;
  logic             w_first;
  logic [BLK_W-1:0] w_blk;
  logic [BOW:0]     wcr;          // write counter inside the block
  logic [WC_W-1:0]  w_rem;        // words of the fragment still to write

  // ---- read port ----
  rstate_e          rst_q;
  rd_desc_t         r_desc;
  logic [BOW:0]     rcr;          // read counter inside the block (issued)
  logic [BOW:0]     r_ret;        // words returned
  logic [OCW-1:0]   r_out;        // reads in flight

  ev_hdr_t          in_hdr;
  assign in_hdr = ev_hdr_t'(inf_data.data);

  // ---- arbiter ----
  logic             wr_want, rd_want, wr_go, rd_go, prio_rd;

  function automatic logic [MAW-1:0] phys(input logic [BLK_W-1:0] blk,
                                          input logic [BOW:0] off);
    return MAW'(blk) * MAW'(BLOCK_WORDS) + MAW'(off);
  endfunction

  assign wr_want = (wst == W_DATA) && inf_valid;
  assign rd_want = (rst_q == R_DATA) && (rcr < (BOW+1)'(r_desc.nwords)) &&
                   ((OCW)'(r_out) + OCW'(1) + outf_count <= OCW'(OUT_DEPTH));

  always_comb begin
    wr_go = 1'b0;
    rd_go = 1'b0;
    if (mem_ready) begin
      if (wr_want && rd_want) begin
        rd_go = prio_rd;
        wr_go = !prio_rd;
      end else begin
        wr_go = wr_want;
        rd_go = rd_want;
      end
    end
  end

  always_comb begin
    mem_req   = wr_want || rd_want;
    mem_we    = wr_go || (!rd_go && wr_want);
    mem_addr  = mem_we ? phys(w_blk, wcr) : phys(r_desc.blk, rcr);
    mem_wdata = inf_data.data;
  end

  // ---- write port combinational ----
  assign alloc_req      = (wst == W_ALLOC);
  assign alloc_first    = w_first;
  assign done_valid     = (wst == W_DONE);
  assign wr_stall_nomem = (wst == W_ALLOC) && !alloc_gnt;

  always_comb begin
    done_hdr = w_hdr;
    case (wst)
      W_IDLE:  inf_ready = 1'b1;
      W_DATA:  inf_ready = wr_go;
      default: inf_ready = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst            <= W_IDLE;
      w_hdr          <= '0;
      w_first        <= 1'b1;
      w_blk          <= '0;
      wcr            <= '0;
      w_rem          <= '0;
      err_stray_word <= 1'b0;
    end else begin
      err_stray_word <= 1'b0;
      case (wst)
        W_IDLE: if (inf_valid) begin
          if (inf_data.first) begin
            w_hdr   <= in_hdr;
            w_rem   <= in_hdr.word_count;
            w_first <= 1'b1;
            wst     <= W_ALLOC;
          end else begin
            err_stray_word <= 1'b1;
          end
        end
        W_ALLOC: if (alloc_gnt) begin
          w_blk <= alloc_blk;
          if (w_first) w_hdr.first_blk <= alloc_blk;
          wcr   <= '0;
          wst   <= (w_rem == '0) ? W_DONE : W_DATA;
        end
        W_DATA: if (wr_go) begin
          w_first <= 1'b0;
          wcr     <= wcr + 1'b1;
          w_rem   <= w_rem - 1'b1;
          if (w_rem == WC_W'(1))                     wst <= W_DONE;
          else if (wcr == (BOW+1)'(BLOCK_WORDS - 1)) wst <= W_ALLOC;
        end
        W_DONE: if (done_ready) begin
          w_first <= 1'b1;
          wst     <= W_IDLE;
        end
        default: wst <= W_IDLE;
      endcase
    end
  end

  // ---- read port ----
  assign rd_ready = (rst_q == R_IDLE);

  always_comb begin
    outf_valid = 1'b0;
    outf_data  = '0;
    if (rst_q == R_HDR) begin
      outf_valid      = 1'b1;
      outf_data.first = 1'b1;
      outf_data.last  = r_desc.last && (r_desc.nwords == '0);
      outf_data.data  = 64'(r_desc.hdr);
    end else if (mem_rvalid) begin
      outf_valid      = 1'b1;
      outf_data.last  = r_desc.last && (r_ret == (BOW+1)'(r_desc.nwords) - 1'b1);
      outf_data.data  = mem_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_q   <= R_IDLE;
      r_desc  <= '0;
      rcr     <= '0;
      r_ret   <= '0;
      r_out   <= '0;
      prio_rd <= 1'b0;
    end else begin
      if (wr_want && rd_want && mem_ready) prio_rd <= !prio_rd;
      r_out <= r_out + OCW'(rd_go) - OCW'(mem_rvalid);
      if (mem_rvalid) r_ret <= r_ret + 1'b1;
      if (rd_go)      rcr   <= rcr + 1'b1;
      case (rst_q)
        R_IDLE: if (rd_valid) begin
          r_desc <= rd_desc;
          rcr    <= '0;
          r_ret  <= '0;
          rst_q  <= rd_desc.first ? R_HDR :
                    (rd_desc.nwords == '0) ? R_IDLE : R_DATA;
        end
        R_HDR: if (outf_ready) rst_q <= (r_desc.nwords == '0) ? R_IDLE : R_DATA;
        R_DATA: if (rd_go && rcr == (BOW+1)'(r_desc.nwords) - 1'b1) rst_q <= R_DRAIN;
        R_DRAIN: if (r_out == '0 || (r_out == OCW'(1) && mem_rvalid)) rst_q <= R_IDLE;
        default: rst_q <= R_IDLE;
      endcase
    end
  end

  // returning data must always find room in the output FIFO
  assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> outf_ready);
  // the header is only written while no read is in flight
  assert property (@(posedge clk) disable iff (!rst_n) (rst_q == R_HDR) |-> (r_out == '0));

endmodule
