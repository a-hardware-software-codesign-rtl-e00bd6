// Self-checking test of cpu_bus_interface with 16-pixel memories.
// Small memory models answer one clock after the strobes the block drives
// (image bytes depend on bank and offset, some image reads are refused). The
// test checks the region decode, read data routing and latency, OSD write
// strobes, offsets past the frame, register reset values, register writes
// and read-back, the self-clearing force/reload pulses, the status word and
// the saturating conflict counter.
module tb_cpu_bus_interface;
  import vd_pkg::*;
  localparam int N = 16, AW = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_cs = 0, cpu_we = 0, cpu_rvalid;
  logic [CPU_AW-1:0] cpu_addr = '0;
  pixel_t cpu_wdata = '0, cpu_rdata;
  logic img_re, img_bank, osd_we, img_conflict;
  logic [AW-1:0] img_addr, bg_addr, osd_addr;
  pixel_t img_rdata, bg_rdata, osd_rdata, osd_wdata;
  logic st_wr_bank = 1, st_stored_valid = 1, st_overflow = 0, st_bg_valid = 1, st_field_full = 1;
  bg_mode_e st_bg_mode = BG_UPDATE;
  logic [15:0] st_field_count = 16'h1234;
  logic [7:0] st_fields_written = 8'h5A;
  logic [AW-1:0] st_moving_last = AW'(13);
  logic osd_en, bg_force, bg_reload;
  logic [7:0] still_th;
  logic [2:0] bg_shift;
  logic [23:0] bg_period;
  pixel_t osd_mem [N];
  logic refuse_next = 0;
  int checks = 0, failures = 0, n_force = 0, n_reload = 0;

  cpu_bus_interface #(.DEPTH(N)) dut (.*);

  always #5 clk = ~clk;

  // memory models, one clock of read latency
  always @(posedge clk) begin
    img_rdata    <= img_re ? pixel_t'({3'(img_bank), 5'(img_addr)} ^ 8'hA5) : 8'hEE;
    img_conflict <= img_re && refuse_next;
    bg_rdata     <= pixel_t'(bg_addr) + 8'h40;
    osd_rdata    <= osd_mem[osd_addr[3:0]];
    if (osd_we) osd_mem[osd_addr[3:0]] <= osd_wdata;
    if (rst_n && bg_force) n_force++;
    if (rst_n && bg_reload) n_reload++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [CPU_AW-1:0] adr(input region_e r, input int unsigned ofs);
    return {r, 17'(ofs)};
  endfunction

  task automatic wr(input logic [CPU_AW-1:0] a, input pixel_t d);
    @(negedge clk); cpu_cs = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_cs = 0; cpu_we = 0;
  endtask

  task automatic rd(input logic [CPU_AW-1:0] a, input pixel_t exp, input string what);
    @(negedge clk); cpu_cs = 1; cpu_we = 0; cpu_addr = a;
    @(negedge clk); cpu_cs = 0;
    chk(cpu_rvalid, {what, " rvalid"});
    chk(cpu_rdata == exp, $sformatf("%s: got %02h expected %02h", what, cpu_rdata, exp));
  endtask

  initial begin
    for (int i = 0; i < N; i++) osd_mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reset values
    rd(adr(RGN_REGS, REG_STILL_TH), DEF_STILL_TH, "still_th reset");
    rd(adr(RGN_REGS, REG_BG_SHIFT), 8'(DEF_BG_SHIFT), "shift reset");
    rd(adr(RGN_REGS, REG_PERIOD_0), 8'(DEF_BG_PERIOD), "period byte 0");
    rd(adr(RGN_REGS, REG_PERIOD_1), 8'(DEF_BG_PERIOD >> 8), "period byte 1");
    rd(adr(RGN_REGS, REG_PERIOD_2), 8'(DEF_BG_PERIOD >> 16), "period byte 2");
    chk(bg_period == 24'd72000, "period is 72000 fields");
    // image, background, out of range
    for (int i = 0; i < 20; i++) begin
      automatic int o = $urandom_range(0, N - 1);
      rd(adr(RGN_BANK0, o), pixel_t'({3'd0, 5'(o)} ^ 8'hA5), "bank 0 byte");
      rd(adr(RGN_BANK1, o), pixel_t'({3'd1, 5'(o)} ^ 8'hA5), "bank 1 byte");
      rd(adr(RGN_BG, o), pixel_t'(o) + 8'h40, "background byte");
    end
    rd(adr(RGN_BANK0, N + 3), 8'h00, "image offset past frame");
    rd(adr(RGN_BG, 1000), 8'h00, "background offset past frame");
    rd(3'd6 << 17, 8'h00, "unused region");
    // OSD write/read
    for (int i = 0; i < N; i++) wr(adr(RGN_OSD, i), pixel_t'(i * 7 + 1));
    wr(adr(RGN_OSD, N + 1), 8'h77);     // ignored
    for (int i = 0; i < N; i++) rd(adr(RGN_OSD, i), pixel_t'(i * 7 + 1), "OSD byte");
    // registers
    wr(adr(RGN_REGS, REG_STILL_TH), 8'd33);
    rd(adr(RGN_REGS, REG_STILL_TH), 8'd33, "still_th");
    chk(still_th == 8'd33, "still_th output");
    wr(adr(RGN_REGS, REG_BG_SHIFT), 8'd5);
    chk(bg_shift == 3'd5, "shift output");
    wr(adr(RGN_REGS, REG_PERIOD_0), 8'd4);
    wr(adr(RGN_REGS, REG_PERIOD_1), 8'd0);
    wr(adr(RGN_REGS, REG_PERIOD_2), 8'd0);
    chk(bg_period == 24'd4, "period output");
    wr(adr(RGN_REGS, REG_CTRL), 8'b011);
    chk(osd_en && bg_force, "osd_en set, force pulse");
    @(negedge clk);
    chk(!bg_force, "force pulse lasts one clock");
    wr(adr(RGN_REGS, REG_CTRL), 8'b101);
    @(negedge clk);
    chk(n_force == 1 && n_reload == 1, "one force and one reload pulse");
    rd(adr(RGN_REGS, REG_CTRL), 8'h01, "control read");
    rd(adr(RGN_REGS, REG_STATUS), {1'b0, BG_UPDATE, 1'b1, 1'b1, 1'b0, 1'b1, 1'b1}, "status");
    rd(adr(RGN_REGS, REG_FIELDS_LO), 8'h34, "fields lo");
    rd(adr(RGN_REGS, REG_FIELDS_HI), 8'h12, "fields hi");
    rd(adr(RGN_REGS, REG_UPDATES), 8'h5A, "updates");
    rd(adr(RGN_REGS, REG_MOVING_LO), 8'd13, "moving lo");
    // conflicts
    refuse_next = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); cpu_cs = 1; cpu_we = 0; cpu_addr = adr(RGN_BANK1, 2);
    end
    @(negedge clk); cpu_cs = 0; refuse_next = 0;
    repeat (3) @(negedge clk);
    rd(adr(RGN_REGS, REG_CONFLICTS), 8'hFF, "conflict counter saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
