// Simple dual-port RAM: one synchronous write port and one synchronous read
// port on the same clock, read data one cycle after the address. A read of
// the address written in the same cycle returns the old contents. The array
// is left uninitialised: the users never read a word before writing it, or
// mask such reads. Used for the line buffers and the cost memories of the
// SGM engine (block RAMs on the FPGA).
module sdp_ram #(
  parameter int unsigned DEPTH = 640,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
