// Background updater: keeps the road-background frame up to date.
//
// The system derives the background from two consecutive stored images by
// subtraction and refreshes it smoothly, once every 20 minutes, so that slow
// changes of light and shadow are followed while passing vehicles are not
// learnt. This block holds the background memory and, field by field, does
// one of three things, chosen at each field start:
//   BG_INIT   - copy the incoming field into the background. Done for the
//               first field after reset and after a reload request.
//   BG_UPDATE - for every pixel, d = |current - previous field|. A pixel with
//               d <= still_th is still: the background moves toward it by
//               (current - background) >>> shift. A pixel with larger d is
//               moving (a vehicle) and leaves the background alone; moving
//               pixels are counted. Done once every `period` fields (the
//               default, 72000 fields, is 20 minutes at 60 fields/s) and for
//               the next field after a force request.
//   BG_IDLE   - all other fields.
// The subtraction of consecutive fields and the 20-minute rhythm follow the
// system description; the single-weight running-average rule (the simplest
// form of the learning update the system mentions), the still threshold and
// the request inputs are choices of this design.
//
// Interface and timing: in_valid/in_addr/in_data is the capture's write
// stream; prev_data is the previous field's byte at in_addr and must arrive
// one clock after it (as the dual image memory provides). field_start marks
// the cycle of the first write of a field (or precedes it). The background is
// read in the pixel's cycle and written back one clock later; addresses rise
// within a field, so a pixel never reads an address still being written.
// The CPU reads the background through cpu_addr, data one clock later.
module background_updater
  import vd_pkg::*;
#(
  parameter int unsigned DEPTH = vd_pkg::FRAME_PIXELS,
  localparam int unsigned AW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          field_start,
  input  logic          prev_ok,        // a previous field is stored
  input  logic          in_valid,
  input  logic [AW-1:0] in_addr,
  input  pixel_t        in_data,
  input  pixel_t        prev_data,
  input  logic [23:0]   period,
  input  logic [7:0]    still_th,
  input  logic [2:0]    shift,
  input  logic          force_update,   // request: next field is an update field
  input  logic          reload,         // request: next field re-initialises
  input  logic [AW-1:0] cpu_addr,
  output pixel_t        cpu_rdata,
  output bg_mode_e      mode,           // mode of the field now being captured
  output logic          bg_valid,
  output logic [7:0]    fields_written,
  output logic [AW-1:0] moving_last     // moving pixels of the last update field
);

  bg_mode_e    mode_q;
  bg_mode_e    mode_next;
  logic        force_pend, reload_pend;
  logic [23:0] since;
  logic        valid_now;

  // ---- field scheduler ---------------------------------------------------
  assign valid_now = bg_valid || (mode_q == BG_INIT);

  always_comb begin
    if (reload_pend || reload || !valid_now)
      mode_next = BG_INIT;
    else if (prev_ok && (force_pend || force_update || (since + 24'd1 >= period)))
      mode_next = BG_UPDATE;
    else
      mode_next = BG_IDLE;
  end

  assign mode = field_start ? mode_next : mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q         <= BG_IDLE;
      bg_valid       <= 1'b0;
      force_pend     <= 1'b0;
      reload_pend    <= 1'b0;
      since          <= '0;
      fields_written <= '0;
    end else begin
      if (field_start) begin
        mode_q      <= mode_next;
        bg_valid    <= valid_now && !(reload_pend || reload);
        force_pend  <= (mode_next == BG_UPDATE) ? 1'b0 : (force_pend || force_update);
        reload_pend <= 1'b0;
        if (mode_next != BG_IDLE) begin
          since          <= '0;
          fields_written <= fields_written + 8'd1;
        end else begin
          since <= since + 24'd1;
        end
      end else begin
        if (force_update) force_pend  <= 1'b1;
        if (reload)       reload_pend <= 1'b1;
      end
    end
  end

  // ---- pixel pipeline ----------------------------------------------------
  logic          s1_valid, s1_fs;
  logic [AW-1:0] s1_addr;
  pixel_t        s1_cur;
  bg_mode_e      s1_mode, s1_old_mode;
  pixel_t        bg_rd;
  logic          bg_we;
  pixel_t        bg_wdata;
  logic [8:0]    diff_cp;      // |current - previous|
  logic signed [9:0] diff_cb;  // current - background
  logic signed [9:0] step;
  logic          moving;
  logic [AW-1:0] moving_acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid    <= 1'b0;
      s1_fs       <= 1'b0;
      s1_addr     <= '0;
      s1_cur      <= '0;
      s1_mode     <= BG_IDLE;
      s1_old_mode <= BG_IDLE;
    end else begin
      s1_valid    <= in_valid;
      s1_fs       <= field_start;
      s1_addr     <= in_addr;
      s1_cur      <= in_data;
      s1_mode     <= mode;
      s1_old_mode <= mode_q;
    end
  end

  always_comb begin
    diff_cp  = (s1_cur >= prev_data) ? 9'(s1_cur - prev_data) : 9'(prev_data - s1_cur);
    diff_cb  = $signed({2'b00, s1_cur}) - $signed({2'b00, bg_rd});
    step     = diff_cb >>> shift;
    moving   = (diff_cp > {1'b0, still_th});
    bg_we    = 1'b0;
    bg_wdata = s1_cur;
    if (s1_valid) begin
      unique case (s1_mode)
        BG_INIT: begin
          bg_we    = 1'b1;
          bg_wdata = s1_cur;
        end
        BG_UPDATE: begin
          bg_we    = !moving;
          bg_wdata = 8'($signed({2'b00, bg_rd}) + step);
        end
        default: bg_we = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      moving_acc  <= '0;
      moving_last <= '0;
    end else begin
      if (s1_fs) begin
        if (s1_old_mode == BG_UPDATE) moving_last <= moving_acc;
        moving_acc <= (s1_valid && s1_mode == BG_UPDATE && moving) ? AW'(1) : '0;
      end else if (s1_valid && s1_mode == BG_UPDATE && moving) begin
        moving_acc <= moving_acc + 1'b1;
      end
    end
  end

  frame_ram #(.DEPTH(DEPTH), .DW(PIX_W), .AW(AW)) u_bg_ram (
    .clk     (clk),
    .we      (bg_we),
    .waddr   (s1_addr),
    .wdata   (bg_wdata),
    .raddr_a (in_addr),
    .rdata_a (bg_rd),
    .raddr_b (cpu_addr),
    .rdata_b (cpu_rdata)
  );

endmodule
