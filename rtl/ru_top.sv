// Readout Unit (RU): one RUM board and two RUIO boards.
//
// The RU buffers event fragments from a front-end driver (FED) and sends the
// fragment of a requested event to the builder network (BDN). This top wires
// the configuration with an input RUIO, the RUM and an output RUIO:
//   host bus : the host, and the primary ports of the three bridges
//   bus #1   : FED network card, input RUIO bridge, RUM bridge, RUM input
//              interface (event data into the RUM)
//   bus #2   : BDN network card, output RUIO bridge, RUM bridge, RUM output
//              interface (requests in, fragments out)
//   bus #3   : RUM bridge port to the RUM local bus (brought out as ports)
//   RUIO local buses : third port of each RUIO bridge, where the I/O processor
//              sits (brought out as ports)
// The three local buses are 32 bits wide, as on the boards: a pci_width_conv
// on each of those bridge ports turns every 64-bit word into two 32-bit data
// phases and back.
// Inside the RUM, fragments written to the input window pass the input FIFO
// (two 2K x 36 FIFOs side by side), are stored block by block by the memory
// controller under the MMU's block allocation, and are catalogued by event
// number. A request (OP_SEND) read back through the output FIFO leaves as a
// write on bus #2 to the address given in the request; OP_RELEASE frees the
// blocks. The data memory (SDRAM DIMMs) is outside: its port is brought out.
// Every bus carries 64-bit packet transactions (see ru_pkg). Address regions
// (bits [31:28]) and their routes are this design's choice: host memory 0,
// RUM input 1, RUM requests 2, BDN 3, RUM local bus 4, input RUIO local 6,
// output RUIO local 7, FED 8. Board partitioning, the bus topology and the
// components follow the document's block diagrams; one clock for everything
// is this design's simplification.
module ru_top
  import ru_pkg::*;
#(
  parameter int unsigned NBLK          = 131072,  // 512 MByte in 4 KByte blocks
  parameter int unsigned BLOCK_WORDS   = 512,
  parameter int unsigned ET_DEPTH      = 131072,
  parameter int unsigned PORT_FIFO_DEPTH = 2048,  // 2K x 36 FIFOs
  parameter int unsigned BR_CMD_DEPTH  = 16,
  parameter int unsigned BR_DATA_DEPTH = 512,
  localparam int unsigned MAW          = $clog2(NBLK * BLOCK_WORDS),
  localparam int unsigned BAW          = $clog2(NBLK)
) (
  input  logic         clk,
  input  logic         rst_n,
  // host on the host bus
  input  logic         host_m_valid,
  output logic         host_m_ready,
  input  logic [63:0]  host_m_data,
  output logic         host_t_valid,
  input  logic         host_t_ready,
  output logic [63:0]  host_t_data,
  // FED network card on bus #1
  input  logic         fed_m_valid,
  output logic         fed_m_ready,
  input  logic [63:0]  fed_m_data,
  output logic         fed_t_valid,
  input  logic         fed_t_ready,
  output logic [63:0]  fed_t_data,
  // BDN network card on bus #2
  input  logic         bdn_m_valid,
  output logic         bdn_m_ready,
  input  logic [63:0]  bdn_m_data,
  output logic         bdn_t_valid,
  input  logic         bdn_t_ready,
  output logic [63:0]  bdn_t_data,
  // RUM local bus (bus #3) and the two RUIO local buses: [0] RUM, [1] input
  // RUIO, [2] output RUIO. *_in: into the RU, *_out: out of it.
  input  logic [2:0]        lb_in_valid,
  output logic [2:0]        lb_in_ready,
  input  logic [2:0][31:0]  lb_in_data,
  output logic [2:0]        lb_out_valid,
  input  logic [2:0]        lb_out_ready,
  output logic [2:0][31:0]  lb_out_data,
  // data memory
  output logic             mem_req,
  output logic             mem_we,
  output logic [MAW-1:0]   mem_addr,
  output logic [63:0]      mem_wdata,
  input  logic             mem_ready,
  input  logic             mem_rvalid,
  input  logic [63:0]      mem_rdata,
  // status
  output logic             init_done,
  output logic [BAW:0]     free_blocks,
  output logic             stall_nomem,
  output logic             bus2_retry,
  output logic [31:0]      frags_in,
  output logic [31:0]      frags_out,
  output logic [7:0]       errors
);

  function automatic logic [15:0] rm(input logic [3:0] r);
    return 16'(1) << r;
  endfunction

  // region claims of the bus agents
  localparam logic [3:0][15:0] HOST_REG = {
    rm(REG_RUIOO_LB),                                          // output RUIO
    rm(REG_RUM_IN) | rm(REG_RUM_CMD) | rm(REG_BDN) | rm(REG_RUM_LB), // RUM
    rm(REG_FED) | rm(REG_RUIOI_LB),                            // input RUIO
    rm(REG_HOST)};                                             // host
  localparam logic [3:0][15:0] BUS1_REG = {
    rm(REG_RUM_IN),                                            // RUM input
    rm(REG_RUM_CMD) | rm(REG_BDN) | rm(REG_RUM_LB) | rm(REG_RUIOO_LB),
    rm(REG_HOST) | rm(REG_RUIOI_LB),
    rm(REG_FED)};
  localparam logic [3:0][15:0] BUS2_REG = {
    rm(REG_RUM_CMD),                                           // RUM output
    rm(REG_RUM_IN) | rm(REG_FED) | rm(REG_RUM_LB) | rm(REG_RUIOI_LB),
    rm(REG_HOST) | rm(REG_RUIOO_LB),
    rm(REG_BDN)};
  // routes through the bridges, per port
  localparam logic [2:0][15:0] PBR_IN_REG = {
    rm(REG_RUIOI_LB),
    rm(REG_FED) | rm(REG_RUM_IN) | rm(REG_RUM_CMD) | rm(REG_BDN) | rm(REG_RUM_LB),
    rm(REG_HOST) | rm(REG_RUIOO_LB)};
  localparam logic [3:0][15:0] PBR_RUM_REG = {
    rm(REG_RUM_LB),
    rm(REG_RUM_CMD) | rm(REG_BDN) | rm(REG_RUIOO_LB),
    rm(REG_RUM_IN) | rm(REG_FED) | rm(REG_RUIOI_LB),
    rm(REG_HOST)};
  localparam logic [2:0][15:0] PBR_OUT_REG = {
    rm(REG_RUIOO_LB),
    rm(REG_BDN) | rm(REG_RUM_CMD) | rm(REG_RUM_IN),
    rm(REG_HOST) | rm(REG_RUIOI_LB) | rm(REG_FED)};

  // ---- bus segment wiring ----
  logic [3:0]       hb_mv, hb_mr, hb_tv, hb_tr;
  logic [3:0][63:0] hb_md, hb_td;
  logic [3:0]       b1_mv, b1_mr, b1_tv, b1_tr;
  logic [3:0][63:0] b1_md, b1_td;
  logic [3:0]       b2_mv, b2_mr, b2_tv, b2_tr;
  logic [3:0][63:0] b2_md, b2_td;
  logic [3:0]       hb_gnt, b1_gnt, b2_gnt;
  logic             hb_err, b1_err, b2_err;

  // bridge ports
  logic [2:0]       pi_iv, pi_ir, pi_ov, pi_or, pi_err;
  logic [2:0][63:0] pi_id, pi_od;
  logic [3:0]       pr_iv, pr_ir, pr_ov, pr_or, pr_err;
  logic [3:0][63:0] pr_id, pr_od;
  logic [2:0]       po_iv, po_ir, po_ov, po_or, po_err;
  logic [2:0][63:0] po_id, po_od;

  // RUM interfaces
  logic             rin_tr, rout_tr, rout_retry, rout_mv;
  logic             hb_retry, b1_retry, b2_retry;
  logic [63:0]      rout_md;

  // host bus: 0 host, 1 input RUIO, 2 RUM, 3 output RUIO
  assign hb_mv = {po_ov[0], pr_ov[0], pi_ov[0], host_m_valid};
  assign hb_md = {po_od[0], pr_od[0], pi_od[0], host_m_data};
  assign host_m_ready = hb_mr[0];
  assign hb_tr = {po_ir[0], pr_ir[0], pi_ir[0], host_t_ready};
  assign host_t_valid = hb_tv[0];
  assign host_t_data  = hb_td[0];

  // bus #1: 0 FED card, 1 input RUIO, 2 RUM bridge, 3 RUM input interface
  assign b1_mv = {1'b0, pr_ov[1], pi_ov[1], fed_m_valid};
  assign b1_md = {64'd0, pr_od[1], pi_od[1], fed_m_data};
  assign fed_m_ready = b1_mr[0];
  assign b1_tr = {rin_tr, pr_ir[1], pi_ir[1], fed_t_ready};
  assign fed_t_valid = b1_tv[0];
  assign fed_t_data  = b1_td[0];

  // bus #2: 0 BDN card, 1 output RUIO, 2 RUM bridge, 3 RUM output interface
  assign b2_mv = {rout_mv, pr_ov[2], po_ov[1], bdn_m_valid};
  assign b2_md = {rout_md, pr_od[2], po_od[1], bdn_m_data};
  assign bdn_m_ready = b2_mr[0];
  assign b2_tr = {rout_tr, pr_ir[2], po_ir[1], bdn_t_ready};
  assign bdn_t_valid = b2_tv[0];
  assign bdn_t_data  = b2_td[0];

  // 32-bit local buses: [0] RUM bus #3, [1] input RUIO, [2] output RUIO
  logic [2:0]       lw_iv, lw_ir, lw_ov, lw_or;
  logic [2:0][63:0] lw_id, lw_od;

  for (genvar g = 0; g < 3; g++) begin : g_lbconv
    pci_width_conv u_conv (
      .clk, .rst_n,
      .w_in_valid  (lw_ov[g]),       .w_in_ready  (lw_or[g]),       .w_in_data  (lw_od[g]),
      .n_out_valid (lb_out_valid[g]), .n_out_ready (lb_out_ready[g]), .n_out_data (lb_out_data[g]),
      .n_in_valid  (lb_in_valid[g]),  .n_in_ready  (lb_in_ready[g]),  .n_in_data  (lb_in_data[g]),
      .w_out_valid (lw_iv[g]),       .w_out_ready (lw_ir[g]),       .w_out_data (lw_id[g]));
  end

  // bridge port inputs (transactions arriving from the buses)
  assign pi_iv = {lw_iv[1], b1_tv[1], hb_tv[1]};
  assign pi_id = {lw_id[1],  b1_td[1], hb_td[1]};
  assign pr_iv = {lw_iv[0], b2_tv[2], b1_tv[2], hb_tv[2]};
  assign pr_id = {lw_id[0],  b2_td[2], b1_td[2], hb_td[2]};
  assign po_iv = {lw_iv[2], b2_tv[1], hb_tv[3]};
  assign po_id = {lw_id[2],  b2_td[1], hb_td[3]};
  assign lw_ir = {po_ir[2], pi_ir[2], pr_ir[3]};

  // bridge port outputs towards the buses
  assign pi_or = {lw_or[1], b1_mr[1], hb_mr[1]};
  assign pr_or = {lw_or[0], b2_mr[2], b1_mr[2], hb_mr[2]};
  assign po_or = {lw_or[2], b2_mr[1], hb_mr[3]};
  assign lw_ov = {po_ov[2], pi_ov[2], pr_ov[3]};
  assign lw_od  = {po_od[2], pi_od[2], pr_od[3]};

  pci_seg #(.NAG(4), .REGIONS(HOST_REG)) u_host_bus (
    .clk, .rst_n,
    .m_valid (hb_mv), .m_ready (hb_mr), .m_data (hb_md),
    .t_valid (hb_tv), .t_ready (hb_tr), .t_retry (4'b0000), .t_data (hb_td),
    .gnt (hb_gnt), .retry (hb_retry), .err_nodev (hb_err));

  pci_seg #(.NAG(4), .REGIONS(BUS1_REG)) u_bus1 (
    .clk, .rst_n,
    .m_valid (b1_mv), .m_ready (b1_mr), .m_data (b1_md),
    .t_valid (b1_tv), .t_ready (b1_tr), .t_retry (4'b0000), .t_data (b1_td),
    .gnt (b1_gnt), .retry (b1_retry), .err_nodev (b1_err));

  pci_seg #(.NAG(4), .REGIONS(BUS2_REG)) u_bus2 (
    .clk, .rst_n,
    .m_valid (b2_mv), .m_ready (b2_mr), .m_data (b2_md),
    .t_valid (b2_tv), .t_ready (b2_tr), .t_retry ({rout_retry, 3'b000}), .t_data (b2_td),
    .gnt (b2_gnt), .retry (b2_retry), .err_nodev (b2_err));

  // ---- bridges: input RUIO (3B PBR), RUM (4B PBR), output RUIO (3B PBR) ----
  pci_bridge #(.NP(3), .REGIONS(PBR_IN_REG), .CMD_DEPTH(BR_CMD_DEPTH),
               .DATA_DEPTH(BR_DATA_DEPTH)) u_pbr_ruio_in (
    .clk, .rst_n,
    .in_valid (pi_iv), .in_ready (pi_ir), .in_data (pi_id),
    .out_valid (pi_ov), .out_ready (pi_or), .out_data (pi_od),
    .err_nodev (pi_err));

  pci_bridge #(.NP(4), .REGIONS(PBR_RUM_REG), .CMD_DEPTH(BR_CMD_DEPTH),
               .DATA_DEPTH(BR_DATA_DEPTH)) u_pbr_rum (
    .clk, .rst_n,
    .in_valid (pr_iv), .in_ready (pr_ir), .in_data (pr_id),
    .out_valid (pr_ov), .out_ready (pr_or), .out_data (pr_od),
    .err_nodev (pr_err));

  pci_bridge #(.NP(3), .REGIONS(PBR_OUT_REG), .CMD_DEPTH(BR_CMD_DEPTH),
               .DATA_DEPTH(BR_DATA_DEPTH)) u_pbr_ruio_out (
    .clk, .rst_n,
    .in_valid (po_iv), .in_ready (po_ir), .in_data (po_id),
    .out_valid (po_ov), .out_ready (po_or), .out_data (po_od),
    .err_nodev (po_err));

  // ---- RUM input path ----
  logic        inw_v, inw_r, inr_v, inr_r;
  fifo_word_t  inw_d, inr_d;
  logic        in_r_hi, in_r_lo, in_v_hi, in_v_lo;
  localparam int unsigned PCW = $clog2(PORT_FIFO_DEPTH) + 1;
  logic [PCW-1:0] in_cnt_hi, in_cnt_lo;

  rum_pci_in u_rum_pci_in (
    .clk, .rst_n,
    .t_valid (b1_tv[3]), .t_ready (rin_tr), .t_data (b1_td[3]),
    .fifo_valid (inw_v), .fifo_ready (inw_r), .fifo_data (inw_d),
    .frag_count (frags_in));

  // two 36-bit FIFOs side by side, moved in lock step
  assign inw_r = in_r_hi && in_r_lo;
  assign inr_v = in_v_hi && in_v_lo;

  sync_fifo #(.WIDTH(36), .DEPTH(PORT_FIFO_DEPTH)) u_in_fifo_hi (
    .clk, .rst_n,
    .in_valid (inw_v && inw_r), .in_ready (in_r_hi), .in_data (inw_d[71:36]),
    .out_valid (in_v_hi), .out_ready (inr_v && inr_r), .out_data (inr_d[71:36]),
    .count (in_cnt_hi));

  sync_fifo #(.WIDTH(36), .DEPTH(PORT_FIFO_DEPTH)) u_in_fifo_lo (
    .clk, .rst_n,
    .in_valid (inw_v && inw_r), .in_ready (in_r_lo), .in_data (inw_d[35:0]),
    .out_valid (in_v_lo), .out_ready (inr_v && inr_r), .out_data (inr_d[35:0]),
    .count (in_cnt_lo));

  // ---- MMU and memory controller ----
  logic             alloc_req, alloc_first, alloc_gnt;
  logic [BLK_W-1:0] alloc_blk;
  logic             done_v, done_r;
  ev_hdr_t          done_hdr;
  logic             cmd_v, cmd_r;
  mmu_cmd_t         cmd;
  logic             rdd_v, rdd_r;
  rd_desc_t         rdd;
  logic             err_coll, err_relmiss, err_stray, err_op;

  mmu #(.NBLK(NBLK), .BLOCK_WORDS(BLOCK_WORDS), .ET_DEPTH(ET_DEPTH)) u_mmu (
    .clk, .rst_n,
    .init_done (init_done),
    .alloc_req, .alloc_first, .alloc_gnt, .alloc_blk,
    .done_valid (done_v), .done_ready (done_r), .done_hdr,
    .cmd_valid (cmd_v), .cmd_ready (cmd_r), .cmd,
    .rd_valid (rdd_v), .rd_ready (rdd_r), .rd_desc (rdd),
    .free_count (free_blocks),
    .err_collision (err_coll), .err_release_missing (err_relmiss));

  logic        outw_v, outw_r, outr_v, outr_r;
  fifo_word_t  outw_d, outr_d;
  logic        out_r_hi, out_r_lo, out_v_hi, out_v_lo;
  logic [PCW-1:0] out_cnt_hi, out_cnt_lo;

  mem_ctrl #(.NBLK(NBLK), .BLOCK_WORDS(BLOCK_WORDS), .OUT_DEPTH(PORT_FIFO_DEPTH)) u_mc (
    .clk, .rst_n,
    .inf_valid (inr_v), .inf_ready (inr_r), .inf_data (inr_d),
    .alloc_req, .alloc_first, .alloc_gnt, .alloc_blk,
    .done_valid (done_v), .done_ready (done_r), .done_hdr,
    .rd_valid (rdd_v), .rd_ready (rdd_r), .rd_desc (rdd),
    .outf_valid (outw_v), .outf_ready (outw_r), .outf_data (outw_d),
    .outf_count (out_cnt_hi),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_rvalid, .mem_rdata,
    .wr_stall_nomem (stall_nomem), .err_stray_word (err_stray));

  // ---- RUM output path ----
  assign outw_r = out_r_hi && out_r_lo;
  assign outr_v = out_v_hi && out_v_lo;

  sync_fifo #(.WIDTH(36), .DEPTH(PORT_FIFO_DEPTH)) u_out_fifo_hi (
    .clk, .rst_n,
    .in_valid (outw_v && outw_r), .in_ready (out_r_hi), .in_data (outw_d[71:36]),
    .out_valid (out_v_hi), .out_ready (outr_v && outr_r), .out_data (outr_d[71:36]),
    .count (out_cnt_hi));

  sync_fifo #(.WIDTH(36), .DEPTH(PORT_FIFO_DEPTH)) u_out_fifo_lo (
    .clk, .rst_n,
    .in_valid (outw_v && outw_r), .in_ready (out_r_lo), .in_data (outw_d[35:0]),
    .out_valid (out_v_lo), .out_ready (outr_v && outr_r), .out_data (outr_d[35:0]),
    .count (out_cnt_lo));

  rum_pci_out u_rum_pci_out (
    .clk, .rst_n,
    .t_valid (b2_tv[3]), .t_ready (rout_tr), .t_retry (rout_retry), .t_data (b2_td[3]),
    .m_valid (rout_mv), .m_ready (b2_mr[3]), .m_data (rout_md),
    .cmd_valid (cmd_v), .cmd_ready (cmd_r), .cmd,
    .fifo_valid (outr_v), .fifo_ready (outr_r), .fifo_data (outr_d),
    .err_bad_op (err_op), .sent_count (frags_out));

  assign bus2_retry = b2_retry;

  assign errors = {err_op, err_stray, err_relmiss, err_coll,
                   (|pi_err) | (|pr_err) | (|po_err), b2_err, b1_err, hb_err};

  // the two halves of each port buffer never disagree
  assert property (@(posedge clk) disable iff (!rst_n) in_cnt_hi == in_cnt_lo);
  assert property (@(posedge clk) disable iff (!rst_n) out_cnt_hi == out_cnt_lo);

endmodule
