// On-screen display: overlays CPU-written graphics on the monitor video.
//
// The system keeps a separate OSD memory that both the CPU and the FPGA can
// reach. The CPU writes a byte at the address of the monitor pixel it wants
// to mark (one byte per pixel of the 320 x 240 picture); the FPGA adds that
// byte to the incoming video byte on its way to the NTSC encoder. An OSD byte
// of zero leaves the pixel unchanged.
//
// Choices of this design: the sum saturates at 255 so a bright mark on bright
// video stays white instead of wrapping; pixels outside the frame and all
// pixels while osd_en is low pass unchanged; the OSD memory is not cleared
// by reset (the CPU clears it).
//
// Timing: the video stream (vid_*) comes one clock after the decoder, with
// each pixel's frame address. The OSD byte is read at that address and the
// encoder outputs follow one clock later, VRESET and valid delayed alike.
// CPU writes take effect at the clock edge; CPU reads return one clock later.
module osd_unit
  import vd_pkg::*;
#(
  parameter int unsigned DEPTH = vd_pkg::FRAME_PIXELS,
  localparam int unsigned AW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          osd_en,
  input  logic          vid_vreset,
  input  logic          vid_valid,
  input  pixel_t        vid_data,
  input  logic [AW-1:0] vid_addr,
  input  logic          vid_in_frame,
  output logic          enc_vreset,
  output logic          enc_valid,
  output pixel_t        enc_data,
  input  logic          cpu_we,
  input  logic [AW-1:0] cpu_waddr,
  input  pixel_t        cpu_wdata,
  input  logic [AW-1:0] cpu_raddr,
  output pixel_t        cpu_rdata
);

  pixel_t     osd_rd;
  logic       mix_q;
  pixel_t     data_q;
  logic [8:0] sum;

  frame_ram #(.DEPTH(DEPTH), .DW(PIX_W), .AW(AW)) u_osd_ram (
    .clk     (clk),
    .we      (cpu_we),
    .waddr   (cpu_waddr),
    .wdata   (cpu_wdata),
    .raddr_a (vid_addr),
    .rdata_a (osd_rd),
    .raddr_b (cpu_raddr),
    .rdata_b (cpu_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_vreset <= 1'b0;
      enc_valid  <= 1'b0;
      data_q     <= '0;
      mix_q      <= 1'b0;
    end else begin
      enc_vreset <= vid_vreset;
      enc_valid  <= vid_valid;
      data_q     <= vid_data;
      mix_q      <= osd_en && vid_valid && vid_in_frame;
    end
  end

  assign sum      = {1'b0, data_q} + {1'b0, osd_rd};
  assign enc_data = !mix_q ? data_q : (sum[8] ? 8'hFF : sum[7:0]);

endmodule
