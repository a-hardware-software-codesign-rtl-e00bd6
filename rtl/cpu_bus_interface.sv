// CPU local-bus interface of the FPGA.
//
// The ARM7 CPU reaches the two image memories, the background memory, the OSD
// memory and a small register file over its local address, data and control
// bus. This block decodes one bus access per clock: the address is
// {region[2:0], offset[16:0]} with the regions of vd_pkg::region_e, and the
// data bus is one byte wide (one pixel). Image and background memories are
// read-only for the CPU; the OSD memory and the registers can be written.
// Offsets at or above the frame size read as 0 and ignore writes, as do
// unused regions and register offsets.
//
// Registers (vd_pkg::reg_e): status, control (OSD enable; self-clearing
// background force and reload requests), still threshold and update shift of
// the background updater, a 16-bit stored-field counter, the 24-bit
// background-update period in fields (72000 at reset, 20 minutes at 60
// fields/s), a saturating count of image reads refused because they hit the
// bank being written, the number of background fields written and the moving-
// pixel count of the last update field.
//
// Timing: cpu_cs is a one-clock access strobe, with cpu_we, cpu_addr and
// cpu_wdata valid in the same clock. Writes take effect at that edge; read
// data comes with cpu_rvalid one clock later. The single clock shared with the
// video side, the byte-wide bus and the whole map are choices of this design;
// the system only names the bus and the memories on it.
module cpu_bus_interface
  import vd_pkg::*;
#(
  parameter int unsigned DEPTH = vd_pkg::FRAME_PIXELS,
  parameter int unsigned BG_PERIOD = vd_pkg::DEF_BG_PERIOD,
  localparam int unsigned AW = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU bus
  input  logic              cpu_cs,
  input  logic              cpu_we,
  input  logic [CPU_AW-1:0] cpu_addr,
  input  pixel_t            cpu_wdata,
  output logic              cpu_rvalid,
  output pixel_t            cpu_rdata,
  // image memories
  output logic              img_re,
  output logic              img_bank,
  output logic [AW-1:0]     img_addr,
  input  pixel_t            img_rdata,
  input  logic              img_conflict,
  // background memory
  output logic [AW-1:0]     bg_addr,
  input  pixel_t            bg_rdata,
  // OSD memory
  output logic              osd_we,
  output logic [AW-1:0]     osd_addr,
  output pixel_t            osd_wdata,
  input  pixel_t            osd_rdata,
  // status in
  input  logic              st_wr_bank,
  input  logic              st_stored_valid,
  input  logic              st_overflow,
  input  logic              st_field_full,
  input  bg_mode_e          st_bg_mode,
  input  logic              st_bg_valid,
  input  logic [15:0]       st_field_count,
  input  logic [7:0]        st_fields_written,
  input  logic [AW-1:0]     st_moving_last,
  // control out
  output logic              osd_en,
  output logic              bg_force,
  output logic              bg_reload,
  output logic [7:0]        still_th,
  output logic [2:0]        bg_shift,
  output logic [23:0]       bg_period
);

  region_e           rgn;
  logic [OFS_W-1:0]  ofs;
  logic              in_range;
  logic              rd;
  region_e           rgn_q;
  logic              in_range_q;
  pixel_t            reg_q;
  logic [7:0]        conflicts;
  logic [16:0]       moving17;

  assign rgn      = region_e'(cpu_addr[CPU_AW-1 -: 3]);
  assign ofs      = cpu_addr[OFS_W-1:0];
  assign in_range = (32'(ofs) < DEPTH);
  assign rd       = cpu_cs && !cpu_we;

  assign img_re    = rd && in_range && (rgn == RGN_BANK0 || rgn == RGN_BANK1);
  assign img_bank  = (rgn == RGN_BANK1);
  assign img_addr  = AW'(ofs);
  assign bg_addr   = AW'(ofs);
  assign osd_addr  = AW'(ofs);
  assign osd_we    = cpu_cs && cpu_we && in_range && (rgn == RGN_OSD);
  assign osd_wdata = cpu_wdata;
  assign moving17  = 17'(st_moving_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      osd_en     <= 1'b0;
      bg_force   <= 1'b0;
      bg_reload  <= 1'b0;
      still_th   <= DEF_STILL_TH;
      bg_shift   <= DEF_BG_SHIFT;
      bg_period  <= 24'(BG_PERIOD);
      conflicts  <= '0;
      cpu_rvalid <= 1'b0;
      rgn_q      <= RGN_BANK0;
      in_range_q <= 1'b0;
      reg_q      <= '0;
    end else begin
      bg_force   <= 1'b0;
      bg_reload  <= 1'b0;
      cpu_rvalid <= rd;
      rgn_q      <= rgn;
      in_range_q <= in_range;
      if (img_conflict && conflicts != 8'hFF) conflicts <= conflicts + 8'd1;

      if (cpu_cs && cpu_we && rgn == RGN_REGS) begin
        unique case (ofs)
          17'(REG_CTRL): begin
            osd_en    <= cpu_wdata[0];
            bg_force  <= cpu_wdata[1];
            bg_reload <= cpu_wdata[2];
          end
          17'(REG_STILL_TH): still_th        <= cpu_wdata;
          17'(REG_BG_SHIFT): bg_shift        <= cpu_wdata[2:0];
          17'(REG_PERIOD_0): bg_period[7:0]  <= cpu_wdata;
          17'(REG_PERIOD_1): bg_period[15:8] <= cpu_wdata;
          17'(REG_PERIOD_2): bg_period[23:16]<= cpu_wdata;
          default: ;
        endcase
      end

      if (rd && rgn == RGN_REGS) begin
        unique case (ofs)
          17'(REG_STATUS):     reg_q <= {1'b0, st_bg_mode, st_field_full, st_bg_valid, st_overflow,
                                          st_stored_valid, st_wr_bank};
          17'(REG_CTRL):       reg_q <= {7'b0, osd_en};
          17'(REG_STILL_TH):   reg_q <= still_th;
          17'(REG_BG_SHIFT):   reg_q <= {5'b0, bg_shift};
          17'(REG_FIELDS_LO):  reg_q <= st_field_count[7:0];
          17'(REG_FIELDS_HI):  reg_q <= st_field_count[15:8];
          17'(REG_PERIOD_0):   reg_q <= bg_period[7:0];
          17'(REG_PERIOD_1):   reg_q <= bg_period[15:8];
          17'(REG_PERIOD_2):   reg_q <= bg_period[23:16];
          17'(REG_CONFLICTS):  reg_q <= conflicts;
          17'(REG_UPDATES):    reg_q <= st_fields_written;
          17'(REG_MOVING_LO):  reg_q <= moving17[7:0];
          17'(REG_MOVING_MID): reg_q <= moving17[15:8];
          17'(REG_MOVING_HI):  reg_q <= {7'b0, moving17[16]};
          default:             reg_q <= '0;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rgn_q)
      RGN_BANK0, RGN_BANK1: cpu_rdata = in_range_q ? img_rdata : '0;
      RGN_BG:               cpu_rdata = in_range_q ? bg_rdata  : '0;
      RGN_OSD:              cpu_rdata = in_range_q ? osd_rdata : '0;
      RGN_REGS:             cpu_rdata = reg_q;
      default:              cpu_rdata = '0;
    endcase
  end

endmodule
