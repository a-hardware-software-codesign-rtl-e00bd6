// Dual image memory with its bus switch.
//
// Two frame memories work in ping-pong, as the system's dual image memory
// scheme describes: while the capture writes the current field into one bank,
// the CPU reads the other, and the roles swap at every VRESET, so one bank
// always holds the odd field and the other the even field. The board does
// this switching with bus buffers between each SRAM and the FPGA and CPU
// buses; here the switch is the bank-select logic.
//
// Ports:
//  - write port (from the capture): wr_en, wr_bank, wr_addr, wr_data.
//  - previous-field port: prev_addr reads the bank NOT being written
//    (selected by wr_bank in the same cycle); prev_data follows one clock
//    later. The background updater uses it to compare the incoming pixel with
//    the same pixel of the previous field.
//  - CPU port: cpu_re with cpu_bank and cpu_addr; cpu_rvalid and cpu_rdata one
//    clock later. A CPU read of the bank being written while capture runs is
//    refused, as the buffers would keep that SRAM off the CPU bus: cpu_rdata is
//    then 0 and cpu_conflict is high together with cpu_rvalid.
// The second read port of each bank and the refusal rule are choices of this
// design.
module dual_image_memory
  import vd_pkg::*;
#(
  parameter int unsigned DEPTH = vd_pkg::FRAME_PIXELS,
  localparam int unsigned AW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          capture_on,
  input  logic          wr_en,
  input  logic          wr_bank,
  input  logic [AW-1:0] wr_addr,
  input  pixel_t        wr_data,
  input  logic [AW-1:0] prev_addr,
  output pixel_t        prev_data,
  input  logic          cpu_re,
  input  logic          cpu_bank,
  input  logic [AW-1:0] cpu_addr,
  output logic          cpu_rvalid,
  output pixel_t        cpu_rdata,
  output logic          cpu_conflict
);

  pixel_t rd_a [2];
  pixel_t rd_b [2];
  logic   prev_sel_q;
  logic   cpu_sel_q;
  logic   cpu_refuse_q;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    frame_ram #(.DEPTH(DEPTH), .DW(PIX_W), .AW(AW)) u_ram (
      .clk     (clk),
      .we      (wr_en && (wr_bank == 1'(b))),
      .waddr   (wr_addr),
      .wdata   (wr_data),
      .raddr_a (prev_addr),
      .rdata_a (rd_a[b]),
      .raddr_b (cpu_addr),
      .rdata_b (rd_b[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_sel_q   <= 1'b0;
      cpu_sel_q    <= 1'b0;
      cpu_refuse_q <= 1'b0;
      cpu_rvalid   <= 1'b0;
    end else begin
      prev_sel_q   <= !wr_bank;
      cpu_sel_q    <= cpu_bank;
      cpu_refuse_q <= cpu_re && capture_on && (cpu_bank == wr_bank);
      cpu_rvalid   <= cpu_re;
    end
  end

  assign prev_data    = rd_a[prev_sel_q];
  assign cpu_rdata    = cpu_refuse_q ? '0 : rd_b[cpu_sel_q];
  assign cpu_conflict = cpu_rvalid && cpu_refuse_q;

  // The capture only writes inside the frame.
  a_wr_in_frame : assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (32'(wr_addr) < DEPTH));

endmodule
