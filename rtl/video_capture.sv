// Video capture: turns the NTSC decoder's byte stream into image-memory writes.
//
// As the system describes it, the decoder delivers one byte per clock and a
// VRESET that starts each field. On the rising edge of VRESET the capture
// resets the memory address to zero and switches the write to the other image
// memory, so consecutive (odd and even) fields land in alternate banks. Every
// valid pixel is then written at the current address and the address steps by
// one. A field holds IMG_W * IMG_H bytes; bytes past that are not written and
// set `overflow` for the field.
//
// Choices of this design: VRESET is taken as an active-high level whose rising
// edge starts the field; a pixel that is valid in that same cycle is the first
// pixel of the new field. Nothing is written before the first VRESET after
// reset. The bank written first after reset is bank 0.
//
// Timing: every output is registered, one clock after the decoder inputs.
// vid_* is the input stream delayed by that clock, with each pixel's address,
// for the video path to the encoder. field_done pulses (together with the
// VRESET edge that ends a field) when a field has been written; field_pixels,
// field_full and overflow then describe that field.
module video_capture
  import vd_pkg::*;
#(
  parameter int unsigned IMG_W = vd_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = vd_pkg::DEF_IMG_H,
  localparam int unsigned PIXELS = IMG_W * IMG_H,
  localparam int unsigned AW = $clog2(PIXELS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // decoder side
  input  logic          vreset,
  input  logic          pix_valid,
  input  pixel_t        pix_data,
  // delayed video stream
  output logic          vid_vreset,
  output logic          vid_valid,
  output pixel_t        vid_data,
  output logic [AW-1:0] vid_addr,
  output logic          vid_in_frame,
  // image-memory write port
  output logic          wr_en,
  output logic          wr_bank,
  output logic [AW-1:0] wr_addr,
  output pixel_t        wr_data,
  // field status
  output logic          armed,
  output logic          field_start,
  output logic          field_done,
  output logic [AW-1:0] field_pixels,
  output logic          field_full,
  output logic          overflow,
  output logic          stored_valid,
  output logic [15:0]   field_count
);

  logic          vreset_q;
  logic          vr_edge;
  logic [AW-1:0] addr;        // address of the next pixel
  logic [AW-1:0] pix_addr;    // address this cycle's pixel gets
  logic          pix_ok;      // this cycle's pixel fits in the frame
  logic          ovf_field;   // overflow seen in the field being captured

  assign vr_edge  = vreset && !vreset_q;
  assign pix_addr = vr_edge ? '0 : addr;
  assign pix_ok   = (armed || vr_edge) && (32'(pix_addr) < PIXELS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vreset_q     <= 1'b0;
      armed        <= 1'b0;
      addr         <= '0;
      wr_bank      <= 1'b1;      // toggles to bank 0 at the first VRESET
      wr_en        <= 1'b0;
      wr_addr      <= '0;
      wr_data      <= '0;
      vid_vreset   <= 1'b0;
      vid_valid    <= 1'b0;
      vid_data     <= '0;
      vid_addr     <= '0;
      vid_in_frame <= 1'b0;
      field_start  <= 1'b0;
      field_done   <= 1'b0;
      field_pixels <= '0;
      field_full   <= 1'b0;
      overflow     <= 1'b0;
      ovf_field    <= 1'b0;
      stored_valid <= 1'b0;
      field_count  <= '0;
    end else begin
      vreset_q     <= vreset;
      vid_vreset   <= vreset;
      vid_valid    <= pix_valid;
      vid_data     <= pix_data;
      vid_addr     <= pix_addr;
      vid_in_frame <= pix_ok;
      field_start  <= vr_edge;
      field_done   <= vr_edge && armed;

      if (vr_edge) begin
        // close the old field, open the new one in the other bank
        if (armed) begin
          field_pixels <= addr;
          field_full   <= (32'(addr) == PIXELS);
          overflow     <= ovf_field;
          stored_valid <= 1'b1;
          field_count  <= field_count + 16'd1;
        end
        armed     <= 1'b1;
        wr_bank   <= !wr_bank;
        ovf_field <= 1'b0;
        addr      <= '0;
      end

      wr_en   <= pix_valid && pix_ok;
      wr_addr <= pix_addr;
      wr_data <= pix_data;
      if (pix_valid && pix_ok) addr <= pix_addr + 1'b1;
      if (pix_valid && (armed || vr_edge) && !pix_ok) ovf_field <= 1'b1;
    end
  end

endmodule
