// checker_ram: one checker table (sAdrRam, jAdrRam or ctrlRam).
//
// A single-port-read, single-port-write memory written as an array so that
// FPGA tools map it to block RAM. The read is synchronous: the address
// presented in one cycle (the checker's next CUPC) gives its word on rd_data
// in the following cycle, so the entry of the CFI the checker waits for is
// ready as soon as the CUPC register holds its index. The write port loads
// the table (from a program analyzer, over a bus, or from a testbench) and
// has no effect on a read in the same cycle (read-before-write).
// The tables, their contents and their sizes (512 to 4096 entries) follow
// the paper; the synchronous read and the load port are this design's
// choice for a block-RAM implementation.
module checker_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 30,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  // load port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  // read port, one cycle latency
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
