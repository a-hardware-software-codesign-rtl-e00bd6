// Frame memory: one byte per pixel, one write port and two read ports.
//
// This stands in for a board SRAM (the system uses 128 K x 8 asynchronous
// SRAMs for its image memories) and is also used for the background and OSD
// memories. Writes happen at the clock edge when `we` is high. Each read port
// returns the byte at its address one clock after the address is presented
// (registered output); a read of the address written in the same cycle returns
// the old byte. The two read ports let the pixel pipeline and the CPU read the
// same memory without arbitration, a simplification of the single-port chip.
// Contents are not cleared by reset.
module frame_ram #(
  parameter int unsigned DEPTH = 76800,
  parameter int unsigned DW    = 8,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [DW-1:0] rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [DW-1:0] rdata_b
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata_a <= (32'(raddr_a) < DEPTH) ? mem[raddr_a] : '0;
    rdata_b <= (32'(raddr_b) < DEPTH) ? mem[raddr_b] : '0;
  end

endmodule
