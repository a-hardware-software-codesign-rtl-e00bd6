// Self-checking test of background_updater with a 16-pixel frame.
// Sends fields as the capture would, with the previous field's byte returned
// one clock after each pixel. A reference model (copy on init fields;
// bg += (cur - bg) >>> shift on still pixels of update fields; moving pixels
// counted) predicts the background, which is read back through the CPU port
// after every field, and predicts the mode chosen at each field start:
// init after reset, periodic update every `period` fields, a forced update,
// and a reload.
module tb_background_updater;
  import vd_pkg::*;
  localparam int N = 16, AW = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic field_start = 0, prev_ok = 0, in_valid = 0;
  logic [AW-1:0] in_addr = '0, cpu_addr = '0, moving_last;
  pixel_t in_data = '0, prev_data = '0, cpu_rdata;
  logic [23:0] period = 24'd3;
  logic [7:0] still_th = 8'd10;
  logic [2:0] shift = 3'd1;
  logic force_update = 0, reload = 0, bg_valid;
  bg_mode_e mode;
  logic [7:0] fields_written;

  int checks = 0, failures = 0;
  int ref_bg [N], ref_prev [N], ref_cur [N];
  int n_init = 0, n_update = 0, n_idle = 0, n_moving_total = 0;
  int m_since = 0, m_written = 0, m_moving_last = 0;
  bit m_valid = 0;

  background_updater #(.DEPTH(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) prev_data <= pixel_t'(ref_prev[in_addr]);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one field; `kind` 0 = mostly still pixels, 1 = random (vehicles)
  task automatic send_field(input int kind, input bit do_force, input bit do_reload);
    bg_mode_e exp_mode;
    int moving = 0;
    // model of the scheduler
    if (do_reload || !m_valid) exp_mode = BG_INIT;
    else if (prev_ok && (do_force || m_since + 1 >= period)) exp_mode = BG_UPDATE;
    else exp_mode = BG_IDLE;
    if (do_force) begin @(negedge clk); force_update = 1; @(negedge clk); force_update = 0; end
    if (do_reload) begin @(negedge clk); reload = 1; @(negedge clk); reload = 0; end
    for (int i = 0; i < N; i++) begin
      ref_prev[i] = ref_cur[i];
      ref_cur[i] = (kind == 0) ? (ref_prev[i] + $urandom_range(0, 6)) % 256 : $urandom_range(0, 255);
    end
    for (int i = 0; i < N; ) begin
      @(negedge clk);
      field_start = (i == 0);
      in_valid = (i == 0) || ($urandom_range(0, 2) != 0);
      in_addr = AW'(i);
      in_data = pixel_t'(ref_cur[i]);
      if (i == 0) begin
        #1 chk(mode == exp_mode, $sformatf("mode %s expected %s", mode.name(), exp_mode.name()));
      end
      if (in_valid) i++;
    end
    @(negedge clk); field_start = 0; in_valid = 0;
    repeat (2) @(negedge clk);
    prev_ok = 1;
    // model of the pixel rule
    for (int i = 0; i < N; i++) begin
      int d, diff;
      d = ref_cur[i] - ref_prev[i]; if (d < 0) d = -d;
      if (exp_mode == BG_INIT) ref_bg[i] = ref_cur[i];
      else if (exp_mode == BG_UPDATE) begin
        if (d <= still_th) begin
          diff = ref_cur[i] - ref_bg[i];
          ref_bg[i] = ref_bg[i] + (diff >>> shift);
        end else moving++;
      end
    end
    case (exp_mode)
      BG_INIT:   begin n_init++; m_since = 0; m_written++; m_valid = 1; end
      BG_UPDATE: begin n_update++; m_since = 0; m_written++; m_moving_last = moving; n_moving_total += moving; end
      default:   begin n_idle++; m_since++; end
    endcase
    // read back the whole background
    for (int i = 0; i < N; i++) begin
      @(negedge clk) cpu_addr = AW'(i);
      @(posedge clk) #1 chk(cpu_rdata == pixel_t'(ref_bg[i]), $sformatf("background[%0d]", i));
    end
    chk(fields_written == 8'(m_written), "fields_written");
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin ref_cur[i] = $urandom_range(0, 255); ref_bg[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    send_field(0, 0, 0);   // init
    chk(!bg_valid, "background not yet valid during the init field");
    send_field(0, 0, 0);   // idle
    chk(bg_valid, "background valid once the init field has ended");
    send_field(1, 0, 0);   // idle
    send_field(0, 0, 0);   // periodic update (period 3)
    send_field(1, 0, 0);   // idle
    send_field(1, 1, 0);   // forced update with moving pixels
    send_field(0, 0, 0);   // idle
    send_field(0, 0, 1);   // reload
    period = 24'd1;
    shift = 3'd0;
    send_field(0, 0, 0);   // update every field, shift 0 copies still pixels
    send_field(1, 0, 0);
    // the moving count of an update field is latched at the next field start
    @(negedge clk) field_start = 1;
    @(negedge clk) field_start = 0;
    repeat (2) @(negedge clk);
    chk(moving_last == AW'(m_moving_last), "moving_last");
    chk(n_init == 2 && n_update == 4 && n_idle == 4, "mode mix");
    chk(n_moving_total > 0, "moving pixels seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
