// End-to-end test of vd_fpga_top at its full size (320 x 240, default
// parameters) over ten fields.
//
// A decoder model sends a synthetic road: a fixed textured background with
// small noise, and per field and per detection zone a bright or dark vehicle
// that covers none, 10, 40 or all 64 pixels of the zone. Vehicle intensity
// alternates between fields, so vehicles look like motion to the background
// updater. A CPU model answers every field interrupt over the bus as the
// system's software would: it reads the stored field and the background for
// eight zones, reduces each zone to 32 samples, counts samples outside
// background +/- 25 and calls the zone occupied when more than 25 % (8 of 32)
// are outside. Its decisions are compared with the scene.
//
// Reference models in the testbench predict the encoder stream (video plus
// OSD, clipped), the stored image bytes, the background after every field
// and the background mode of every field. Mechanisms exercised and counted:
// bank alternation, refused CPU read of the bank being written, background
// init, periodic update (period programmed to 3 fields), forced update,
// reload, capture overflow, OSD overlay with clipping, occupied and free
// zones, and one field sent without gaps (a pixel every clock, as fast as
// the decoder can deliver). One that never happens is a failure.
module tb_vd_fpga_top;
  import vd_pkg::*;
  localparam int W = DEF_IMG_W, H = DEF_IMG_H, N = W * H;
  localparam int NF = 10;
  localparam int ZW = 64, NS = 32, NZ = 8, DET_TH = 25, STILL = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dec_vreset = 0, dec_valid = 0;
  pixel_t dec_data = '0;
  logic enc_vreset, enc_valid;
  pixel_t enc_data;
  logic cpu_cs = 0, cpu_we = 0, cpu_rvalid, field_irq;
  logic [CPU_AW-1:0] cpu_addr = '0;
  pixel_t cpu_wdata = '0, cpu_rdata;

  vd_fpga_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_bank[2] = '{0, 0};
  int n_conflict = 0, n_init = 0, n_update_periodic = 0, n_update_forced = 0, n_reload = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;
  int n_gapless = 0;
  int n_overflow = 0, n_osd_clip = 0, n_osd_add = 0, n_occupied = 0, n_free = 0, n_bg_checked = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- scene
  int zx [NZ], zy [NZ];
  int veh_w [NF][NZ];     // covered width
  bit veh_dark [NF][NZ];
  byte unsigned fld [2][N];
  int bg_m [N];
  byte unsigned osd_m [N];
  bit osd_en_m = 0;
  bg_mode_e mode_m [NF];
  int period_m = DEF_BG_PERIOD, since_m = 0;
  bit force_pend_m = 0, reload_pend_m = 0, forced_m [NF], reloaded_m [NF];
  int moving_m [NF];
  int fields_done = 0;
  bit cpu_done = 0;

  function automatic int road(int x, int y);
    return 70 + ((x * 3 + y * 5) % 80);
  endfunction

  function automatic int pixel_of(int f, int x, int y);
    for (int z = 0; z < NZ; z++)
      if (y >= zy[z] - 4 && y <= zy[z] + 4 && x >= zx[z] && x < zx[z] + veh_w[f][z])
        return veh_dark[f][z] ? ((f % 2) ? 40 : 10) : ((f % 2) ? 250 : 200);
    return road(x, y) + $urandom_range(0, 3);
  endfunction

  // -------------------------------------------------------- decoder model
  int drv_addr = 0;
  bit drv_inframe = 0;

  task automatic send_field(input int f, input int extra, input bit gapless);
    int a = 0;
    longint t_first = 0;
    // VRESET; the field interrupt for field f-1 comes with it
    @(negedge clk); dec_vreset = 1; dec_valid = 0;
    // background mode the hardware must pick for this field
    if (reload_pend_m || f == 0) mode_m[f] = BG_INIT;
    else if (force_pend_m || since_m + 1 >= period_m) mode_m[f] = BG_UPDATE;
    else mode_m[f] = BG_IDLE;
    forced_m[f] = force_pend_m && mode_m[f] == BG_UPDATE && !(since_m + 1 >= period_m);
    reloaded_m[f] = reload_pend_m;
    force_pend_m = 0; reload_pend_m = 0;
    if (mode_m[f] == BG_IDLE) since_m++; else since_m = 0;
    repeat (2) @(negedge clk);
    dec_vreset = 0;
    repeat (20) @(negedge clk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; ) begin
        if (!gapless && $urandom_range(0, 15) == 0) begin
          dec_valid = 0;
        end else begin
          int v = pixel_of(f, x, y);
          fld[f % 2][a] = byte'(v);
          dec_valid = 1; dec_data = pixel_t'(v); drv_addr = a; drv_inframe = 1;
          if (a == 0) t_first = cycle;
          if (a == N - 1 && gapless) begin
            chk(cycle - t_first == N - 1, "gapless field: one pixel per clock");
            n_gapless++;
          end
          x++; a++;
        end
        @(negedge clk);
      end
    end
    for (int e = 0; e < extra; e++) begin
      dec_valid = 1; dec_data = 8'h99; drv_addr = N; drv_inframe = 0;
      @(negedge clk);
    end
    dec_valid = 0;
    // background model at the end of the field
    moving_m[f] = 0;
    for (int i = 0; i < N; i++) begin
      int cur = fld[f % 2][i], prv = fld[(f + 1) % 2][i], d;
      d = cur - prv; if (d < 0) d = -d;
      if (mode_m[f] == BG_INIT) bg_m[i] = cur;
      else if (mode_m[f] == BG_UPDATE) begin
        if (d <= STILL) bg_m[i] = bg_m[i] + ((cur - bg_m[i]) >>> DEF_BG_SHIFT);
        else moving_m[f]++;
      end
    end
    n_bank[f % 2]++;
    fields_done = f + 1;
    repeat (200) @(negedge clk);
  endtask

  // ------------------------------------------------ encoder stream check
  // p_*: the decoder inputs sampled at the previous edge, which the capture
  // now holds; the encoder byte after this edge is made from them.
  bit p_val = 0, p_vr = 0, p_inf = 0;
  int p_data = 0, p_addr = 0;
  always @(posedge clk) begin
    int exp;
    bit mix, e_val, e_vr;
    if (rst_n) begin
      e_val = p_val; e_vr = p_vr;
      mix = osd_en_m && p_val && p_inf;
      exp = p_data + (mix ? osd_m[p_addr] : 0);
      if (mix && osd_m[p_addr] != 0) begin
        if (exp > 255) n_osd_clip++; else n_osd_add++;
      end
      if (exp > 255) exp = 255;
      // CPU writes sampled at this edge take effect after it
      if (cpu_cs && cpu_we && cpu_addr[19:17] == RGN_OSD && cpu_addr[16:0] < N)
        osd_m[cpu_addr[16:0]] = cpu_wdata;
      if (cpu_cs && cpu_we && cpu_addr == {RGN_REGS, 17'(REG_CTRL)})
        osd_en_m = cpu_wdata[0];
      p_val = dec_valid; p_vr = dec_vreset; p_inf = dec_valid && drv_inframe;
      p_data = dec_data; p_addr = drv_addr;
      #1;
      chk(enc_valid == e_val && enc_vreset == e_vr, "encoder valid/VRESET");
      chk(enc_data == pixel_t'(exp), $sformatf("encoder byte: got %0d expected %0d", enc_data, exp));
    end
  end

  // ------------------------------------------------------------ CPU model
  task automatic bus_wr(input region_e r, input int ofs, input pixel_t d);
    @(negedge clk); cpu_cs = 1; cpu_we = 1; cpu_addr = {r, 17'(ofs)}; cpu_wdata = d;
    @(negedge clk); cpu_cs = 0; cpu_we = 0;
  endtask

  task automatic bus_rd(input region_e r, input int ofs, output int d);
    @(negedge clk); cpu_cs = 1; cpu_we = 0; cpu_addr = {r, 17'(ofs)};
    @(negedge clk); cpu_cs = 0;
    chk(cpu_rvalid, "cpu_rvalid");
    d = cpu_rdata;
  endtask

  // the detection software: 32 samples per zone, out-of-range count > 25 %
  task automatic detect(input int k);
    for (int z = 0; z < NZ; z++) begin
      int cnt = 0, truth_cnt = 0;
      bit occ, truth;
      for (int s = 0; s < NS; s++) begin
        int a = zy[z] * W + zx[z] + 2 * s, img, bg;
        bus_rd(region_e'(k % 2), a, img);
        bus_rd(RGN_BG, a, bg);
        if (img < bg - DET_TH || img > bg + DET_TH) cnt++;
        if (2 * s < veh_w[k][z]) truth_cnt++;
      end
      occ = (cnt * 4 > NS);
      truth = (truth_cnt * 4 > NS);
      chk(occ == truth, $sformatf("field %0d zone %0d: occupied %0d expected %0d (count %0d)", k, z, occ, truth, cnt));
      if (occ) n_occupied++; else n_free++;
    end
  endtask

  initial begin
    int d;
    for (int z = 0; z < NZ; z++) begin zx[z] = 16 + (z % 4) * 76; zy[z] = 60 + (z / 4) * 100; end
    for (int f = 0; f < NF; f++)
      for (int z = 0; z < NZ; z++) begin
        automatic int c = $urandom_range(0, 3);
        veh_w[f][z] = (f == 0 || f == NF - 1) ? 0 : (c == 0) ? 0 : (c == 1) ? 10 : (c == 2) ? 40 : ZW;
        veh_dark[f][z] = 1'($urandom);
      end
    for (int i = 0; i < N; i++) osd_m[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // clear the OSD memory before any video
    for (int i = 0; i < N; i++) bus_wr(RGN_OSD, i, 8'h00);
    fork
      begin
        for (int f = 0; f < NF; f++) send_field(f, (f == 6) ? 5 : 0, f == 4);
        @(negedge clk); dec_vreset = 1; repeat (2) @(negedge clk); dec_vreset = 0;
        wait (cpu_done);
      end
      begin
        for (int k = 0; k < NF; k++) begin
          int lo, hi;
          @(posedge clk iff field_irq);
          repeat (4) @(negedge clk);
          // status: bank k+1 is being written, a field is stored
          bus_rd(RGN_REGS, REG_STATUS, d);
          chk(d[0] == 1'((k + 1) % 2) && d[1], "status bank and stored bits");
          chk(d[2] == (k == 6), "status overflow bit");
          chk(d[4], "status: field complete");
          if (d[2]) n_overflow++;
          if (k + 1 < NF) chk(d[6:5] == mode_m[k + 1], $sformatf("field %0d mode", k + 1));
          bus_rd(RGN_REGS, REG_FIELDS_LO, lo);
          bus_rd(RGN_REGS, REG_FIELDS_HI, hi);
          chk(hi * 256 + lo == k + 1, "stored field count");
          // image bytes of the finished field
          for (int i = 0; i < 16; i++) begin
            automatic int a = $urandom_range(0, N - 1);
            bus_rd(region_e'(k % 2), a, d);
            chk(d == fld[k % 2][a], "stored image byte");
          end
          // background, exactly, while the field being captured leaves it alone
          if (k + 1 < NF && mode_m[k + 1] == BG_IDLE) begin
            for (int i = 0; i < 64; i++) begin
              automatic int a = $urandom_range(0, N - 1);
              bus_rd(RGN_BG, a, d);
              chk(d == bg_m[a], $sformatf("background byte %0d: got %0d expected %0d", a, d, bg_m[a]));
            end
            n_bg_checked++;
          end
          if (mode_m[k] == BG_UPDATE) begin
            int m0, m1, m2;
            bus_rd(RGN_REGS, REG_MOVING_LO, m0);
            bus_rd(RGN_REGS, REG_MOVING_MID, m1);
            bus_rd(RGN_REGS, REG_MOVING_HI, m2);
            chk(m0 + 256 * m1 + 65536 * m2 == moving_m[k], "moving pixel count");
          end
          // zone detection, unless the background is being rebuilt
          if (k + 1 >= NF || mode_m[k + 1] != BG_INIT) detect(k);
          case (k)
            0: begin
              // update period 3 fields; OSD: bright zone outlines, dim marks
              bus_wr(RGN_REGS, REG_PERIOD_0, 8'd3);
              bus_wr(RGN_REGS, REG_PERIOD_1, 8'd0);
              bus_wr(RGN_REGS, REG_PERIOD_2, 8'd0);
              period_m = 3;
              for (int z = 0; z < NZ; z++)
                for (int x = 0; x < ZW; x++) begin
                  bus_wr(RGN_OSD, (zy[z] - 6) * W + zx[z] + x, 8'hFF);
                  bus_wr(RGN_OSD, (zy[z] + 6) * W + zx[z] + x, 8'd30);
                end
              bus_wr(RGN_REGS, REG_CTRL, 8'h01);
            end
            2: begin
              // read the bank being written: refused
              bus_rd(region_e'((k + 1) % 2), 100, d);
              chk(d == 0, "refused read returns 0");
              repeat (2) @(negedge clk);
              bus_rd(RGN_REGS, REG_CONFLICTS, d);
              chk(d == 1, "conflict counted");
              if (d == 1) n_conflict++;
            end
            3: begin bus_wr(RGN_REGS, REG_CTRL, 8'h03); force_pend_m = 1; end
            7: begin bus_wr(RGN_REGS, REG_CTRL, 8'h05); reload_pend_m = 1; end
            default: ;
          endcase
        end
        cpu_done = 1;
      end
    join
    for (int f = 0; f < NF; f++) begin
      if (mode_m[f] == BG_INIT && reloaded_m[f]) n_reload++;
      else if (mode_m[f] == BG_INIT) n_init++;
      else if (mode_m[f] == BG_UPDATE && forced_m[f]) n_update_forced++;
      else if (mode_m[f] == BG_UPDATE) n_update_periodic++;
    end
    bus_rd(RGN_REGS, REG_UPDATES, d);
    chk(d == n_init + n_reload + n_update_forced + n_update_periodic, "background fields written");
    $display("mechanisms: bank0=%0d bank1=%0d conflict=%0d init=%0d periodic=%0d forced=%0d reload=%0d",
             n_bank[0], n_bank[1], n_conflict, n_init, n_update_periodic, n_update_forced, n_reload);
    $display("            overflow=%0d osd_add=%0d osd_clip=%0d occupied=%0d free=%0d bg_checked=%0d",
             n_overflow, n_osd_add, n_osd_clip, n_occupied, n_free, n_bg_checked);
    chk(n_bank[0] > 0 && n_bank[1] > 0, "both banks used");
    chk(n_conflict > 0, "refused access happened");
    chk(n_init > 0, "background init happened");
    chk(n_update_periodic > 0, "periodic update happened");
    chk(n_update_forced > 0, "forced update happened");
    chk(n_reload > 0, "reload happened");
    chk(n_overflow > 0, "overflow happened");
    chk(n_osd_add > 0 && n_osd_clip > 0, "OSD add and clip happened");
    chk(n_occupied > 0 && n_free > 0, "occupied and free zones seen");
    chk(n_bg_checked > 0, "background compared");
    chk(n_gapless == 1, "gapless field sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
