// FPGA of the video vehicle detector.
//
// The detector splits its work between an FPGA and an ARM7 CPU. The FPGA
// takes the heavy, regular work on every pixel of every field; the CPU runs
// the detection algorithm on the few zones the operator has set up. This top
// holds all of the FPGA:
//
//   decoder -> video_capture -> dual_image_memory (ping-pong banks)
//                    |                  | previous field
//                    |                  v
//                    +-------> background_updater (background memory)
//                    |
//                    +-------> osd_unit (OSD memory, adder) -> encoder
//
//   CPU bus <-> cpu_bus_interface <-> image banks, background, OSD, registers
//
// The capture writes each field into the bank the CPU is not using and swaps
// banks at every VRESET. While a field is stored, the background updater
// reads the same pixel of the previous field from the other bank and, in
// update fields, moves the background toward pixels that have not changed.
// The video passes to the encoder with the OSD bytes added. field_irq tells
// the CPU that a new field is complete and which bank (status bit 0 inverted)
// it may read.
//
// Everything runs on one clock, the decoder's pixel clock, with dec_valid
// marking pixel cycles; the CPU bus is taken as synchronous to it (a choice of
// this design). Encoder outputs lag the decoder inputs by two clocks. See the
// block files for the timing of each part.
module vd_fpga_top
  import vd_pkg::*;
#(
  parameter int unsigned IMG_W = vd_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = vd_pkg::DEF_IMG_H,
  parameter int unsigned BG_PERIOD_FIELDS = vd_pkg::DEF_BG_PERIOD
) (
  input  logic              clk,
  input  logic              rst_n,
  // NTSC decoder
  input  logic              dec_vreset,
  input  logic              dec_valid,
  input  pixel_t            dec_data,
  // NTSC encoder
  output logic              enc_vreset,
  output logic              enc_valid,
  output pixel_t            enc_data,
  // CPU local bus
  input  logic              cpu_cs,
  input  logic              cpu_we,
  input  logic [CPU_AW-1:0] cpu_addr,
  input  pixel_t            cpu_wdata,
  output logic              cpu_rvalid,
  output pixel_t            cpu_rdata,
  output logic              field_irq
);

  localparam int unsigned DEPTH = IMG_W * IMG_H;
  localparam int unsigned AW = $clog2(DEPTH + 1);

  // capture
  logic          vid_vreset, vid_valid, vid_in_frame;
  pixel_t        vid_data;
  logic [AW-1:0] vid_addr;
  logic          wr_en, wr_bank;
  logic [AW-1:0] wr_addr;
  pixel_t        wr_data;
  logic          armed, field_start, field_done, field_full, overflow, stored_valid;
  logic [15:0]   field_count;
  // memories
  pixel_t        prev_data;
  logic          img_re, img_bank, img_conflict;
  logic [AW-1:0] img_addr, bg_addr, osd_addr;
  pixel_t        img_rdata, bg_rdata, osd_rdata, osd_wdata;
  logic          osd_we;
  // control and status
  logic          osd_en, bg_force, bg_reload, bg_valid;
  logic [7:0]    still_th, fields_written;
  logic [2:0]    bg_shift;
  logic [23:0]   bg_period;
  bg_mode_e      bg_mode;
  logic [AW-1:0] moving_last;

  video_capture #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_capture (
    .clk, .rst_n,
    .vreset       (dec_vreset),
    .pix_valid    (dec_valid),
    .pix_data     (dec_data),
    .vid_vreset, .vid_valid, .vid_data, .vid_addr, .vid_in_frame,
    .wr_en, .wr_bank, .wr_addr, .wr_data,
    .armed, .field_start, .field_done, .field_pixels (), .field_full,
    .overflow, .stored_valid, .field_count
  );

  dual_image_memory #(.DEPTH(DEPTH)) u_images (
    .clk, .rst_n,
    .capture_on   (armed),
    .wr_en, .wr_bank, .wr_addr, .wr_data,
    .prev_addr    (wr_addr),
    .prev_data    (prev_data),
    .cpu_re       (img_re),
    .cpu_bank     (img_bank),
    .cpu_addr     (img_addr),
    .cpu_rvalid   (),
    .cpu_rdata    (img_rdata),
    .cpu_conflict (img_conflict)
  );

  background_updater #(.DEPTH(DEPTH)) u_background (
    .clk, .rst_n,
    .field_start,
    .prev_ok        (stored_valid),
    .in_valid       (wr_en),
    .in_addr        (wr_addr),
    .in_data        (wr_data),
    .prev_data      (prev_data),
    .period         (bg_period),
    .still_th       (still_th),
    .shift          (bg_shift),
    .force_update   (bg_force),
    .reload         (bg_reload),
    .cpu_addr       (bg_addr),
    .cpu_rdata      (bg_rdata),
    .mode           (bg_mode),
    .bg_valid       (bg_valid),
    .fields_written (fields_written),
    .moving_last    (moving_last)
  );

  osd_unit #(.DEPTH(DEPTH)) u_osd (
    .clk, .rst_n,
    .osd_en,
    .vid_vreset, .vid_valid, .vid_data, .vid_addr, .vid_in_frame,
    .enc_vreset, .enc_valid, .enc_data,
    .cpu_we    (osd_we),
    .cpu_waddr (osd_addr),
    .cpu_wdata (osd_wdata),
    .cpu_raddr (osd_addr),
    .cpu_rdata (osd_rdata)
  );

  cpu_bus_interface #(.DEPTH(DEPTH), .BG_PERIOD(BG_PERIOD_FIELDS)) u_bus (
    .clk, .rst_n,
    .cpu_cs, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rvalid, .cpu_rdata,
    .img_re, .img_bank, .img_addr, .img_rdata, .img_conflict,
    .bg_addr, .bg_rdata,
    .osd_we, .osd_addr, .osd_wdata, .osd_rdata,
    .st_wr_bank        (wr_bank),
    .st_stored_valid   (stored_valid),
    .st_overflow       (overflow),
    .st_field_full     (field_full),
    .st_bg_mode        (bg_mode),
    .st_bg_valid       (bg_valid),
    .st_field_count    (field_count),
    .st_fields_written (fields_written),
    .st_moving_last    (moving_last),
    .osd_en, .bg_force, .bg_reload, .still_th, .bg_shift, .bg_period
  );

  assign field_irq = field_done;

endmodule
