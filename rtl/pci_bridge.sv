// Multi-port PCI bridge (the RUM's four-port 4B PBR and the RUIO's three-port
// 3B PBR).
//
// Every port faces one PCI bus. A transaction received on port i (in_* stream:
// header word, then `len` payload words) is forwarded to the port j whose
// REGIONS mask claims the header's address region. Towards each port j the
// bridge keeps two unidirectional FIFOs: a command FIFO for headers and a data
// FIFO for payload words, the structure the document gives for its bridge.
// Several ingress ports may aim at the same port j; an internal round-robin
// arbiter per egress port lets one of them write its whole transaction before
// the next, so headers and payloads stay in order. Each egress side pops a
// header, sends it on out_*, then sends the payload words as they arrive in the
// data FIFO. A transaction whose region no other port claims is consumed and
// dropped with an `err_nodev` pulse. The per-bus arbiters that the document
// also places in the bridge live in pci_seg. Latency through an idle bridge is
// three cycles for the header (arbitration, FIFO write, FIFO read). FIFO sizes,
// the arbitration policy and the packet model are this design's choices. All
// ports are 64 bits wide; the 32-bit bus #3 is made outside the bridge by a
// width converter (pci_width_conv).
module pci_bridge
  import ru_pkg::*;
#(
  parameter int unsigned             NP         = 4,
  parameter logic [NP-1:0][15:0]     REGIONS    = '0,
  parameter int unsigned             CMD_DEPTH  = 16,
  parameter int unsigned             DATA_DEPTH = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NP-1:0]        in_valid,
  output logic [NP-1:0]        in_ready,
  input  logic [NP-1:0][63:0]  in_data,
  output logic [NP-1:0]        out_valid,
  input  logic [NP-1:0]        out_ready,
  output logic [NP-1:0][63:0]  out_data,
  output logic [NP-1:0]        err_nodev
);

  localparam int unsigned IW  = (NP > 1) ? $clog2(NP) : 1;
  localparam int unsigned CAW = (CMD_DEPTH > 1) ? $clog2(CMD_DEPTH) : 1;
  localparam int unsigned DAW = (DATA_DEPTH > 1) ? $clog2(DATA_DEPTH) : 1;

  // ingress state
  logic [NP-1:0]            ig_pay;        // in payload phase
  logic [NP-1:0]            ig_drop;       // payload is being dropped
  logic [NP-1:0][IW-1:0]    ig_dest;
  logic [NP-1:0][LEN_W-1:0] ig_rem;
  logic [NP-1:0][IW-1:0]    dec_dest;
  logic [NP-1:0]            dec_hit;

  // per-egress arbitration
  logic [NP-1:0][NP-1:0]    req;           // req[j][i]: ingress i wants egress j
  logic [NP-1:0][NP-1:0]    gnt;
  logic [NP-1:0]            hold;
  logic [NP-1:0]            ig_push;       // ingress i writes a word this cycle
  logic [NP-1:0]            ig_fin;        // ... and it is its last one

  // FIFO write side, per egress j
  logic [NP-1:0]            cf_in_v, cf_in_r, df_in_v, df_in_r;
  logic [NP-1:0][63:0]      cf_in_d, df_in_d;
  // FIFO read side
  logic [NP-1:0]            cf_out_v, cf_out_r, df_out_v, df_out_r;
  logic [NP-1:0][63:0]      cf_out_d, df_out_d;

  // egress state
  logic [NP-1:0]            eg_pay;
  logic [NP-1:0][LEN_W-1:0] eg_rem;

  // ---- address decode of the word at each ingress ----
  always_comb begin
    for (int unsigned i = 0; i < NP; i++) begin
      dec_dest[i] = '0;
      dec_hit[i]  = 1'b0;
      for (int unsigned j = 0; j < NP; j++)
        if (!dec_hit[i] && j != i && REGIONS[j][region_of(in_data[i])]) begin
          dec_dest[i] = IW'(j);
          dec_hit[i]  = 1'b1;
        end
    end
  end

  // ---- requests, FIFO write muxes, ingress ready ----
  always_comb begin
    req      = '0;
    cf_in_v  = '0;
    df_in_v  = '0;
    cf_in_d  = '0;
    df_in_d  = '0;
    in_ready = '0;
    ig_push  = '0;
    ig_fin   = '0;
    for (int unsigned i = 0; i < NP; i++) begin
      if (ig_pay[i]) begin
        if (ig_drop[i]) begin
          in_ready[i] = 1'b1;
        end else begin
          req[ig_dest[i]][i] = 1'b1;
          if (gnt[ig_dest[i]][i]) begin
            df_in_v[ig_dest[i]] = in_valid[i];
            df_in_d[ig_dest[i]] = in_data[i];
            in_ready[i]         = df_in_r[ig_dest[i]];
          end
        end
        ig_push[i] = in_valid[i] && in_ready[i];
        ig_fin[i]  = ig_push[i] && (ig_rem[i] == LEN_W'(1));
      end else if (in_valid[i]) begin
        if (!dec_hit[i]) begin
          in_ready[i] = 1'b1;
        end else begin
          req[dec_dest[i]][i] = 1'b1;
          if (gnt[dec_dest[i]][i]) begin
            cf_in_v[dec_dest[i]] = 1'b1;
            cf_in_d[dec_dest[i]] = in_data[i];
            in_ready[i]          = cf_in_r[dec_dest[i]];
          end
        end
        ig_push[i] = in_ready[i];
        ig_fin[i]  = ig_push[i] && (len_of(in_data[i]) == '0);
      end
    end
  end

  // hold an egress grant while its owner has more words to write
  always_comb begin
    for (int unsigned j = 0; j < NP; j++) begin
      hold[j] = 1'b0;
      for (int unsigned i = 0; i < NP; i++)
        if (gnt[j][i] && req[j][i] && !ig_fin[i]) hold[j] = 1'b1;
    end
  end

  // ---- ingress state ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ig_pay    <= '0;
      ig_drop   <= '0;
      ig_dest   <= '0;
      ig_rem    <= '0;
      err_nodev <= '0;
    end else begin
      err_nodev <= '0;
      for (int unsigned i = 0; i < NP; i++) begin
        if (ig_push[i]) begin
          if (!ig_pay[i]) begin
            err_nodev[i] <= !dec_hit[i];
            if (len_of(in_data[i]) != '0) begin
              ig_pay[i]  <= 1'b1;
              ig_drop[i] <= !dec_hit[i];
              ig_dest[i] <= dec_dest[i];
              ig_rem[i]  <= len_of(in_data[i]);
            end
          end else begin
            ig_rem[i] <= ig_rem[i] - 1'b1;
            if (ig_rem[i] == LEN_W'(1)) ig_pay[i] <= 1'b0;
          end
        end
      end
    end
  end

  // ---- per-egress FIFOs, arbiter and read side ----
  for (genvar j = 0; j < NP; j++) begin : g_port
    logic [CAW:0] cf_cnt;
    logic [DAW:0] df_cnt;

    rr_arbiter #(.N(NP)) u_arb (
      .clk   (clk),
      .rst_n (rst_n),
      .req   (req[j]),
      .hold  (hold[j]),
      .gnt   (gnt[j])
    );

    sync_fifo #(.WIDTH(64), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (cf_in_v[j]),
      .in_ready  (cf_in_r[j]),
      .in_data   (cf_in_d[j]),
      .out_valid (cf_out_v[j]),
      .out_ready (cf_out_r[j]),
      .out_data  (cf_out_d[j]),
      .count     (cf_cnt)
    );

    sync_fifo #(.WIDTH(64), .DEPTH(DATA_DEPTH)) u_data_fifo (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (df_in_v[j]),
      .in_ready  (df_in_r[j]),
      .in_data   (df_in_d[j]),
      .out_valid (df_out_v[j]),
      .out_ready (df_out_r[j]),
      .out_data  (df_out_d[j]),
      .count     (df_cnt)
    );

    always_comb begin
      if (eg_pay[j]) begin
        out_valid[j] = df_out_v[j];
        out_data[j]  = df_out_d[j];
        df_out_r[j]  = out_ready[j];
        cf_out_r[j]  = 1'b0;
      end else begin
        out_valid[j] = cf_out_v[j];
        out_data[j]  = cf_out_d[j];
        cf_out_r[j]  = out_ready[j];
        df_out_r[j]  = 1'b0;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        eg_pay[j] <= 1'b0;
        eg_rem[j] <= '0;
      end else if (out_valid[j] && out_ready[j]) begin
        if (!eg_pay[j]) begin
          if (len_of(cf_out_d[j]) != '0) begin
            eg_pay[j] <= 1'b1;
            eg_rem[j] <= len_of(cf_out_d[j]);
          end
        end else begin
          eg_rem[j] <= eg_rem[j] - 1'b1;
          if (eg_rem[j] == LEN_W'(1)) eg_pay[j] <= 1'b0;
        end
      end
    end
  end

endmodule
