// Memory Management Unit (MMU) of the Readout Unit Memory board.
//
// The data memory is cut into NBLK blocks of BLOCK_WORDS 64-bit words. The MMU
// keeps three tables:
//   FPQ  free page queue: a FIFO of the numbers of all unused blocks, filled
//        with 0..NBLK-1 after reset, one per cycle, while the ET valid flags
//        are cleared; `init_done` rises when both are done.
//   PBT  block table: for each block, the block that continues the same event.
//   ET   event table, indexed by the low bits of the event number: valid flag
//        and the event header (event number, word count, first block, status).
// Input sequencer: the memory controller asks for a block (`alloc_req`,
// `alloc_first` for the first block of an event) and gets one from the FPQ in
// the same cycle (`alloc_gnt`, `alloc_blk`); the MMU chains it behind the
// event's previous block in the PBT. When the fragment is stored the memory
// controller hands over its header (`done_*`) and the MMU writes the ET. With
// the FPQ empty no block is granted: the input stalls until memory is released.
// Output sequencer: a command (`cmd_*`) either sends an event, by walking its
// block chain and issuing one read descriptor per block to the memory
// controller (`rd_*`), or releases it, by walking the chain and returning every
// block to the FPQ and clearing the ET entry (one block per cycle). Sending an
// event the ET does not hold yields one descriptor with status bit 7 set and no
// data; releasing one pulses `err_release_missing`. An ET write onto a valid
// entry of another event pulses `err_collision` and overwrites it.
// The three tables, the header contents and the release function follow the
// document; the names FPQ, PBT and ET and the input/output sequencers come from its
// MMU diagram. The table layout, block size, one-cycle table access and the
// command set are this design's choices. The tables are on-chip arrays here
// where the board uses an SRAM.
module mmu
  import ru_pkg::*;
#(
  parameter int unsigned NBLK        = 131072,  // 512 MByte / 4 KByte blocks
  parameter int unsigned BLOCK_WORDS = 512,     // 4 KByte of 64-bit words
  parameter int unsigned ET_DEPTH    = 131072,
  localparam int unsigned BAW        = $clog2(NBLK),
  localparam int unsigned EAW        = $clog2(ET_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             init_done,
  // input sequencer
  input  logic             alloc_req,
  input  logic             alloc_first,
  output logic             alloc_gnt,
  output logic [BLK_W-1:0] alloc_blk,
  input  logic             done_valid,
  output logic             done_ready,
  input  ev_hdr_t          done_hdr,
  // output sequencer
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  mmu_cmd_t         cmd,
  output logic             rd_valid,
  input  logic             rd_ready,
  output rd_desc_t         rd_desc,
  // status
  output logic [BAW:0]     free_count,
  output logic             err_collision,
  output logic             err_release_missing
);

  typedef struct packed {
    logic    valid;
    ev_hdr_t hdr;
  } et_entry_t;

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_MISS, S_REL} ostate_e;

  logic [BAW-1:0] fpq [NBLK];
  logic [BAW-1:0] pbt [NBLK];
  et_entry_t      et  [ET_DEPTH];

  localparam int unsigned INIT_N = (NBLK > ET_DEPTH) ? NBLK : ET_DEPTH;
  localparam int unsigned IAW    = $clog2(INIT_N) + 1;

  logic [BAW-1:0] fpq_head, fpq_tail;
  logic [BAW:0]   fpq_count_q;
  logic [IAW-1:0] init_cnt;
  logic [BAW-1:0] chain_tail;     // last block granted to the current input event

  ostate_e        ost;
  logic [BAW-1:0] cur_blk;
  logic [WC_W:0]  rem_words;      // send: words left; release: blocks left
  logic           first_q;
  ev_hdr_t        cur_hdr;

  logic           fpq_pop, fpq_push;
  logic [BAW-1:0] fpq_push_blk;
  et_entry_t      et_rd;
  logic           et_hit;
  logic [EAW-1:0] cmd_idx, done_idx;

  function automatic logic [BAW-1:0] inc(input logic [BAW-1:0] p);
    return (p == BAW'(NBLK - 1)) ? '0 : p + 1'b1;
  endfunction

  function automatic logic [WC_W:0] blocks_of(input logic [WC_W-1:0] wc);
    logic [WC_W:0] n;
    n = ((WC_W+1)'(wc) + (WC_W+1)'(BLOCK_WORDS - 1)) / (WC_W+1)'(BLOCK_WORDS);
    return (n == '0) ? (WC_W+1)'(1) : n;
  endfunction

  // ---- input sequencer ----
  assign alloc_gnt  = init_done && alloc_req && (free_count != '0);
  assign alloc_blk  = BLK_W'(fpq[fpq_head]);
  assign fpq_pop    = alloc_gnt;
  assign done_ready = init_done;
  assign done_idx   = done_hdr.event_id[EAW-1:0];

  // ---- output sequencer ----
  assign cmd_idx   = cmd.event_id[EAW-1:0];
  assign et_rd     = et[cmd_idx];
  assign et_hit    = et_rd.valid && (et_rd.hdr.event_id == cmd.event_id);
  assign cmd_ready = init_done && (ost == S_IDLE);

  always_comb begin
    rd_valid       = 1'b0;
    rd_desc        = '0;
    rd_desc.hdr    = cur_hdr;
    rd_desc.first  = first_q;
    rd_desc.blk    = BLK_W'(cur_blk);
    fpq_push       = 1'b0;
    fpq_push_blk   = cur_blk;
    case (ost)
      S_SEND: begin
        rd_valid       = 1'b1;
        rd_desc.last   = (rem_words <= (WC_W+1)'(BLOCK_WORDS));
        rd_desc.nwords = rd_desc.last ? WC_W'(rem_words) : WC_W'(BLOCK_WORDS);
      end
      S_MISS: begin
        rd_valid       = 1'b1;
        rd_desc.first  = 1'b1;
        rd_desc.last   = 1'b1;
        rd_desc.nwords = '0;
      end
      S_REL:   fpq_push = 1'b1;
      default: ;
    endcase
  end

  assign free_count = fpq_count_q;

  always_ff @(posedge clk) begin
    if (!init_done) begin
      if (init_cnt < IAW'(NBLK)) fpq[BAW'(init_cnt)] <= BAW'(init_cnt);
    end else if (fpq_push) begin
      fpq[fpq_tail] <= fpq_push_blk;
    end
    if (alloc_gnt && !alloc_first) pbt[chain_tail] <= fpq[fpq_head];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done   <= 1'b0;
      init_cnt    <= '0;
      fpq_head    <= '0;
      fpq_tail    <= '0;
      fpq_count_q <= '0;
      chain_tail  <= '0;
    end else begin
      if (!init_done) begin
        init_cnt <= init_cnt + 1'b1;
        if (init_cnt == IAW'(INIT_N - 1)) begin
          init_done   <= 1'b1;
          fpq_count_q <= (BAW+1)'(NBLK);
        end
      end else begin
        if (fpq_pop)  fpq_head <= inc(fpq_head);
        if (fpq_push) fpq_tail <= inc(fpq_tail);
        fpq_count_q <= fpq_count_q + (BAW+1)'(fpq_push) - (BAW+1)'(fpq_pop);
      end
      if (alloc_gnt) chain_tail <= fpq[fpq_head];
    end
  end

  // ---- event table and output sequencer state ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ost                 <= S_IDLE;
      cur_blk             <= '0;
      rem_words           <= '0;
      first_q             <= 1'b0;
      cur_hdr             <= '0;
      err_collision       <= 1'b0;
      err_release_missing <= 1'b0;
    end else if (!init_done) begin
      if (init_cnt < IAW'(ET_DEPTH)) et[EAW'(init_cnt)].valid <= 1'b0;
    end else begin
      err_collision       <= 1'b0;
      err_release_missing <= 1'b0;
      case (ost)
        S_IDLE: if (cmd_valid && cmd_ready) begin
          cur_hdr <= et_rd.hdr;
          cur_blk <= BAW'(et_rd.hdr.first_blk);
          first_q <= 1'b1;
          if (cmd.op == OP_RELEASE) begin
            if (et_hit) begin
              et[cmd_idx].valid <= 1'b0;
              rem_words         <= blocks_of(et_rd.hdr.word_count);
              ost               <= S_REL;
            end else begin
              err_release_missing <= 1'b1;
            end
          end else begin
            if (et_hit) begin
              rem_words <= (WC_W+1)'(et_rd.hdr.word_count);
              ost       <= S_SEND;
            end else begin
              cur_hdr          <= '0;
              cur_hdr.event_id <= cmd.event_id;
              cur_hdr.status   <= 8'h80;
              ost              <= S_MISS;
            end
          end
        end
        S_SEND: if (rd_ready) begin
          first_q <= 1'b0;
          if (rd_desc.last) begin
            ost <= S_IDLE;
          end else begin
            cur_blk   <= pbt[cur_blk];
            rem_words <= rem_words - (WC_W+1)'(BLOCK_WORDS);
          end
        end
        S_MISS: if (rd_ready) ost <= S_IDLE;
        S_REL: begin
          cur_blk   <= pbt[cur_blk];
          rem_words <= rem_words - 1'b1;
          if (rem_words == (WC_W+1)'(1)) ost <= S_IDLE;
        end
        default: ost <= S_IDLE;
      endcase
      // input sequencer writes the header of a stored fragment
      if (done_valid && done_ready) begin
        if (et[done_idx].valid && !(ost == S_IDLE && cmd_valid && cmd_ready &&
                                    cmd.op == OP_RELEASE && cmd_idx == done_idx))
          err_collision <= 1'b1;
        et[done_idx].valid <= 1'b1;
        et[done_idx].hdr   <= done_hdr;
      end
    end
  end

endmodule
