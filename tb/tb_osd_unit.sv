// Self-checking test of osd_unit with a 16-pixel frame.
// The CPU port fills the OSD memory (zeros, small marks and large marks that
// saturate) and reads it back. Random video with addresses then passes
// through; each encoder byte, one clock later, must be the video byte plus the
// OSD byte clipped at 255, or the video byte alone when the overlay is off or
// the pixel is outside the frame. VRESET and valid must follow unchanged.
module tb_osd_unit;
  import vd_pkg::*;
  localparam int N = 16, AW = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic osd_en = 0, vid_vreset = 0, vid_valid = 0, vid_in_frame = 0;
  pixel_t vid_data = '0, enc_data, cpu_wdata = '0, cpu_rdata;
  logic [AW-1:0] vid_addr = '0, cpu_waddr = '0, cpu_raddr = '0;
  logic enc_vreset, enc_valid, cpu_we = 0;
  int ref_osd [N];
  int checks = 0, failures = 0, n_sat = 0, n_mixed = 0, n_plain = 0;

  osd_unit #(.DEPTH(N)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      ref_osd[i] = (i % 4 == 0) ? 0 : (i % 4 == 1) ? 200 : $urandom_range(1, 60);
      @(negedge clk); cpu_we = 1; cpu_waddr = AW'(i); cpu_wdata = pixel_t'(ref_osd[i]);
    end
    @(negedge clk) cpu_we = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk) cpu_raddr = AW'(i);
      @(posedge clk) #1 chk(cpu_rdata == pixel_t'(ref_osd[i]), "OSD read back");
    end
    for (int n = 0; n < 600; n++) begin
      int a, v, exp;
      bit en, inf, val, vr;
      @(negedge clk);
      a = $urandom_range(0, N - 1); v = $urandom_range(0, 255);
      en = (n >= 100) && ($urandom_range(0, 5) != 0);
      inf = ($urandom_range(0, 7) != 0); val = ($urandom_range(0, 4) != 0); vr = ($urandom_range(0, 30) == 0);
      osd_en = en; vid_addr = AW'(a); vid_data = pixel_t'(v); vid_in_frame = inf; vid_valid = val; vid_vreset = vr;
      if (en && inf && val) begin
        exp = v + ref_osd[a];
        if (exp > 255) begin exp = 255; n_sat++; end
        n_mixed++;
      end else begin exp = v; n_plain++; end
      @(posedge clk) #1;
      chk(enc_data == pixel_t'(exp), "encoder byte");
      chk(enc_valid == val && enc_vreset == vr, "encoder timing");
    end
    chk(n_sat > 5 && n_mixed > 50 && n_plain > 50, "saturated, mixed and plain pixels all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
