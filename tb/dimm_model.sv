// Behavioural model of the SDRAM data memory (not synthesizable in this form).
//
// A sparse word-addressed memory behind the memory controller's port: an
// access is taken on a cycle with mem_req and mem_ready high; read data comes
// back LAT cycles later with mem_rvalid, in order. With STALL_PCT above zero,
// mem_ready drops on that share of the cycles at random, standing in for
// refresh and row changes of the real modules. Unwritten words read as zero.
module dimm_model #(
  parameter int unsigned AW        = 26,
  parameter int unsigned LAT       = 2,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mem_req,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_addr,
  input  logic [63:0]   mem_wdata,
  output logic          mem_ready,
  output logic          mem_rvalid,
  output logic [63:0]   mem_rdata
);

  logic [63:0] store [logic [AW-1:0]];
  logic [LAT-1:0]       pv;
  logic [LAT-1:0][63:0] pd;
  int unsigned          writes, reads;
  int unsigned          stall_pct = STALL_PCT;   // may be changed by a testbench

  function automatic logic [63:0] peek(input logic [AW-1:0] a);
    return store.exists(a) ? store[a] : 64'd0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_ready <= 1'b1;
    end else begin
      mem_ready <= ($urandom_range(99) >= stall_pct);
    end
  end

  assign mem_rvalid = pv[LAT-1];
  assign mem_rdata  = pd[LAT-1];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv     <= '0;
      pd     <= '0;
      writes <= 0;
      reads  <= 0;
    end else begin
      pv <= {pv[LAT-2:0], 1'b0};
      pd <= {pd[LAT-2:0], 64'd0};
      if (mem_req && mem_ready) begin
        if (mem_we) begin
          store[mem_addr] = mem_wdata;
          writes <= writes + 1;
        end else begin
          pv[0] <= 1'b1;
          pd[0] <= peek(mem_addr);
          reads <= reads + 1;
        end
      end
    end
  end

endmodule
