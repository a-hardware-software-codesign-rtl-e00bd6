// Self-checking test of video_capture on an 8 x 4 frame.
// Drives fields separated by VRESET pulses with random gaps in the pixel
// stream: full fields, a short field, an overlong field (overflow), pixels
// before the first VRESET (must be ignored) and a pixel in the VRESET cycle.
// A cycle model of the address and bank rules predicts every output one clock
// after the inputs; the test also checks the bank alternation per field.
module tb_video_capture;
  import vd_pkg::*;
  localparam int W = 8, H = 4, N = W * H, AW = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic vreset = 0, pix_valid = 0;
  pixel_t pix_data = '0;
  logic vid_vreset, vid_valid, vid_in_frame, wr_en, wr_bank, armed;
  logic field_start, field_done, field_full, overflow, stored_valid;
  pixel_t vid_data, wr_data;
  logic [AW-1:0] vid_addr, wr_addr, field_pixels;
  logic [15:0] field_count;
  int checks = 0, failures = 0;
  int n_done = 0, n_ovf = 0, n_short = 0, bank0_fields = 0, bank1_fields = 0;

  video_capture #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

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

  // reference model
  logic m_vr_q = 0, m_armed = 0, m_bank = 1, m_ovf = 0, m_stored = 0;
  int   m_addr = 0, m_count = 0;

  always @(posedge clk) begin
    logic edge_v, ok_v, exp_we, exp_done;
    int a;
    if (!rst_n) begin
      m_vr_q = 0; m_armed = 0; m_bank = 1; m_addr = 0; m_count = 0; m_stored = 0;
    end else begin
      edge_v   = vreset && !m_vr_q;
      a        = edge_v ? 0 : m_addr;
      ok_v     = (m_armed || edge_v) && a < N;
      exp_we   = pix_valid && ok_v;
      exp_done = edge_v && m_armed;
      #1;
      chk(wr_en == exp_we, "wr_en");
      if (exp_we) begin
        chk(wr_addr == AW'(a) && wr_data == pix_data, "write address/data");
        chk(wr_bank == (edge_v ? !m_bank : m_bank), "write bank");
      end
      chk(vid_valid == pix_valid && vid_data == pix_data && vid_vreset == vreset, "video delay");
      chk(field_done == exp_done && field_start == edge_v, "field strobes");
      if (exp_done) begin
        n_done++;
        chk(field_pixels == AW'(m_addr), "field_pixels");
        chk(field_full == (m_addr == N), "field_full");
        chk(overflow == m_ovf, "overflow flag");
        chk(field_count == 16'(m_count + 1), "field_count");
        chk(stored_valid, "stored_valid");
        if (m_ovf) n_ovf++;
        if (m_addr < N) n_short++;
        if (m_bank) bank1_fields++; else bank0_fields++;
        m_count++;
      end
      if (edge_v) begin m_armed = 1; m_bank = !m_bank; m_ovf = 0; m_addr = 0; end
      if (exp_we) m_addr = a + 1;
      if (pix_valid && (m_armed) && !ok_v) m_ovf = 1;
      m_vr_q = vreset;
    end
  end

  task automatic field(input int npix, input bit pix_on_vr);
    @(negedge clk); vreset = 1; pix_valid = pix_on_vr; pix_data = 8'($urandom);
    @(negedge clk); vreset = 1; pix_valid = 0;
    @(negedge clk); vreset = 0;
    for (int i = (pix_on_vr ? 1 : 0); i < npix; ) begin
      pix_valid = ($urandom_range(0, 3) != 0);
      pix_data = 8'($urandom);
      if (pix_valid) i++;
      @(negedge clk);
    end
    pix_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // pixels before the first VRESET are ignored
    for (int i = 0; i < 5; i++) begin @(negedge clk); pix_valid = 1; pix_data = 8'(i); end
    @(negedge clk); pix_valid = 0;
    field(N, 0);
    field(N, 1);
    field(N - 7, 0);
    field(N + 5, 0);
    field(N, 0);
    field(N, 1);
    @(negedge clk); vreset = 1; @(negedge clk); vreset = 0;
    repeat (3) @(negedge clk);
    chk(n_done == 6, "six fields completed");
    chk(n_ovf == 1 && n_short == 1, "one overflow and one short field");
    chk(bank0_fields == 3 && bank1_fields == 3, "fields alternate between banks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
