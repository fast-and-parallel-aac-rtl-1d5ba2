// core_ram: simple dual-port RAM with one write port and one synchronous
// read port, used for every buffer of the core unit (SD-RAM, SF-RAM, IQ-RAM,
// the IMDCT Re/Im and output RAMs, the overlap RAM).
//
// Write: on a rising clock edge with we high, mem[waddr] <= wdata.
// Read: rdata is mem[raddr] registered, valid one cycle after raddr; a read of
// the address being written returns the old word. The document gives the
// RAMs and their sizes (Fig. 5, Table 3); the port arrangement is this
// design's choice. The contents are not reset.
module core_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
