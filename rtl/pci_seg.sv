// One PCI bus segment: arbitration between bus masters and address decode.
//
// NAG agents sit on the segment. Each can start transactions (m_* stream, a
// header word followed by `len` payload words) and receive them (t_* stream).
// A round-robin arbiter grants the bus to one master at a time and keeps the
// grant until the last payload word has been accepted, so transactions never
// interleave. The header's region (address bits [31:28]) selects the target:
// the agent whose REGIONS mask has that bit set. A transaction that no other
// agent claims is consumed and dropped, and `err_nodev` pulses (the master-abort
// of a real bus). Words pass combinationally from master to target; the grant
// costs one cycle per transaction. The document asks for one arbiter per bus;
// the packet-level bus model, the region decode and the policy are this
// design's.
module pci_seg
  import ru_pkg::*;
#(
  parameter int unsigned              NAG     = 4,
  parameter logic [NAG-1:0][15:0]     REGIONS = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // masters
  input  logic [NAG-1:0]        m_valid,
  output logic [NAG-1:0]        m_ready,
  input  logic [NAG-1:0][63:0]  m_data,
  // targets
  output logic [NAG-1:0]        t_valid,
  input  logic [NAG-1:0]        t_ready,
  input  logic [NAG-1:0]        t_retry,
  output logic [NAG-1:0][63:0]  t_data,
  // status
  output logic [NAG-1:0]        gnt,
  output logic                  retry,
  output logic                  err_nodev
);

  localparam int unsigned IW = (NAG > 1) ? $clog2(NAG) : 1;

  logic              in_pkt;      // header passed, payload in progress
  logic [LEN_W-1:0]  remaining;
  logic [IW-1:0]     tgt_q;
  logic              drop_q;

  logic [IW-1:0]     own;
  logic              owned;
  logic [IW-1:0]     tgt_d;
  logic              hit_d;
  logic [IW-1:0]     tgt;
  logic              drop;
  logic              xfer;        // a word moves this cycle
  logic              done_now;    // last word of the transaction moves
  pci_hdr_t          hdr;

  always_comb begin
    own   = '0;
    owned = 1'b0;
    for (int unsigned i = 0; i < NAG; i++)
      if (gnt[i]) begin
        own   = IW'(i);
        owned = 1'b1;
      end
  end

  assign hdr = pci_hdr_t'(m_data[own]);

  // Target decode for the header word
  always_comb begin
    tgt_d = '0;
    hit_d = 1'b0;
    for (int unsigned i = 0; i < NAG; i++)
      if (!hit_d && IW'(i) != own && REGIONS[i][hdr.addr[ADDR_W-1 -: 4]]) begin
        tgt_d = IW'(i);
        hit_d = 1'b1;
      end
  end

  assign tgt  = in_pkt ? tgt_q  : tgt_d;
  assign drop = in_pkt ? drop_q : !hit_d;

  always_comb begin
    t_valid = '0;
    m_ready = '0;
    for (int unsigned i = 0; i < NAG; i++) t_data[i] = m_data[own];
    if (owned) begin
      if (drop) begin
        m_ready[own] = 1'b1;
      end else if (!in_pkt && t_retry[tgt]) begin
        m_ready[own] = 1'b0;
      end else begin
        t_valid[tgt] = m_valid[own];
        m_ready[own] = t_ready[tgt];
      end
    end
  end

  assign xfer     = owned && m_valid[own] && m_ready[own];
  assign retry    = owned && m_valid[own] && !in_pkt && !drop && t_retry[tgt];
  assign done_now = xfer && (in_pkt ? (remaining == LEN_W'(1)) : (hdr.len == '0));

  rr_arbiter #(.N(NAG)) u_arb (
    .clk   (clk),
    .rst_n (rst_n),
    .req   (m_valid),
    .hold  (owned && (in_pkt || m_valid[own]) && !done_now && !retry),
    .gnt   (gnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt    <= 1'b0;
      remaining <= '0;
      tgt_q     <= '0;
      drop_q    <= 1'b0;
      err_nodev <= 1'b0;
    end else begin
      err_nodev <= 1'b0;
      if (xfer) begin
        if (!in_pkt) begin
          err_nodev <= !hit_d;
          if (hdr.len != '0) begin
            in_pkt    <= 1'b1;
            remaining <= hdr.len;
            tgt_q     <= tgt_d;
            drop_q    <= !hit_d;
          end
        end else begin
          remaining <= remaining - 1'b1;
          if (remaining == LEN_W'(1)) in_pkt <= 1'b0;
        end
      end
    end
  end

endmodule
