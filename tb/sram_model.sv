// sram_model: behavioural model of the external SRAM that holds the Vertex
// Table (not synthesizable logic; a stand-in for a commodity SRAM chip).
//
// One command per cycle: a read (rd) returns mem[addr] on rdata with rvalid
// exactly LAT cycles later; a write (wr) updates the parts of mem[addr] that
// wpart selects (a word is PARTS equal parts, like byte writes) at the clock
// edge.
// Reads and writes never share a cycle. Words never written read as random
// values, as in a real SRAM after power-up.
module sram_model #(
  parameter int unsigned AW  = 18,
  parameter int unsigned DW  = 18,
  parameter int unsigned LAT = 2,
  parameter int unsigned PARTS = 1
) (
  input  logic          clk,
  input  logic          rd,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  input  logic [PARTS-1:0] wpart,
  output logic          rvalid,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  logic          v_pipe [LAT];
  logic [DW-1:0] d_pipe [LAT];
  int unsigned   reads;

  initial begin
    reads = 0;
    for (int i = 0; i < LAT; i++) begin
      v_pipe[i] = 1'b0;
      d_pipe[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < PARTS; p++)
      if (wr && wpart[p]) mem[addr][p * (DW / PARTS) +: DW / PARTS] <= wdata[p * (DW / PARTS) +: DW / PARTS];
    v_pipe[0] <= rd;
    d_pipe[0] <= mem[addr];
    for (int i = 1; i < LAT; i++) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
    if (rd) reads <= reads + 1;
  end

  assign rvalid = v_pipe[LAT-1];
  assign rdata  = d_pipe[LAT-1];

  a_one_cmd: assert property (@(posedge clk) !(rd && wr))
    else $error("sram_model: read and write in the same cycle");

endmodule
