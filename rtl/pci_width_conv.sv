// Width converter between a 64-bit bus port and a 32-bit PCI bus.
//
// The bridges' fourth bus on the RUM (bus #3) and the I/O processor's buses on
// the RUIO boards are 32-bit PCI, while the rest of the Readout Unit moves
// 64-bit words. This block sits on such a port and converts both directions:
//   down: each 64-bit word of w_in_* leaves on n_out_* as two 32-bit data
//         phases, low half first, then high half;
//   up:   two 32-bit data phases arriving on n_in_* (low half first) form one
//         64-bit word on w_out_*.
// A transaction keeps its 64-bit packet layout (header word, then `len`
// payload words), so on the 32-bit side it takes 2 * (len + 1) data phases.
// Both directions are valid/ready streams without bubbles: the down path
// passes the wide word through combinationally and steps a half-select bit on
// each narrow handshake; the up path registers the low half and presents the
// 64-bit word together with the high half as it arrives. Reset clears both
// half-select bits, so a transaction must start on a word boundary.
// That these buses are 32 bits wide follows the document (its bridge diagram
// and the 32-bit I/O processor interface); the half order and the packet
// layout on the narrow side are this design's choices.
module pci_width_conv (
  input  logic        clk,
  input  logic        rst_n,
  // wide side to narrow side
  input  logic        w_in_valid,
  output logic        w_in_ready,
  input  logic [63:0] w_in_data,
  output logic        n_out_valid,
  input  logic        n_out_ready,
  output logic [31:0] n_out_data,
  // narrow side to wide side
  input  logic        n_in_valid,
  output logic        n_in_ready,
  input  logic [31:0] n_in_data,
  output logic        w_out_valid,
  input  logic        w_out_ready,
  output logic [63:0] w_out_data
);

  logic        dn_hi;     // next narrow phase carries the high half
  logic        up_hi;     // low half is held, waiting for the high half
  logic [31:0] up_lo;

  // ---- down ----
  assign n_out_valid = w_in_valid;
  assign n_out_data  = dn_hi ? w_in_data[63:32] : w_in_data[31:0];
  assign w_in_ready  = n_out_ready && dn_hi;

  // ---- up ----
  assign n_in_ready  = !up_hi || w_out_ready;
  assign w_out_valid = up_hi && n_in_valid;
  assign w_out_data  = {n_in_data, up_lo};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_hi <= 1'b0;
      up_hi <= 1'b0;
      up_lo <= '0;
    end else begin
      if (n_out_valid && n_out_ready) dn_hi <= !dn_hi;
      if (n_in_valid && n_in_ready) begin
        if (!up_hi) up_lo <= n_in_data;
        up_hi <= !up_hi;
      end
    end
  end

  // a wide word, once its low half has gone out, stays until its high half goes
  assert property (@(posedge clk) disable iff (!rst_n)
                   dn_hi |-> (w_in_valid && $stable(w_in_data)));

endmodule
