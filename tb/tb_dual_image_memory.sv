// Self-checking test of dual_image_memory with 16-pixel banks.
// Writes alternate fields into bank 0 and bank 1 as the capture does. While a
// field is written, the previous-field port must return the other bank's
// byte at the same address one clock later, and the CPU port must return the
// other bank's bytes but refuse (data 0, conflict) reads of the bank being
// written. The first two fields are written before capture starts.
module tb_dual_image_memory;
  import vd_pkg::*;
  localparam int N = 16, AW = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic capture_on = 0, wr_en = 0, wr_bank = 0;
  logic [AW-1:0] wr_addr = '0, prev_addr, cpu_addr = '0;
  pixel_t wr_data = '0, prev_data, cpu_rdata;
  logic cpu_re = 0, cpu_bank = 0, cpu_rvalid, cpu_conflict;
  pixel_t ref_mem [2][N];
  int checks = 0, failures = 0, n_conflict = 0, n_prev = 0;

  assign prev_addr = wr_addr;
  dual_image_memory #(.DEPTH(N)) dut (.*);

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

  // one field into `bank`, with CPU reads of random banks in parallel
  // check_prev: the other bank already holds a known field; check_cpu: both
  // banks hold known bytes, so CPU reads can be checked
  task automatic write_field(input logic bank, input bit check_prev, input bit check_cpu);
    for (int i = 0; i < N; i++) begin
      pixel_t exp_prev, exp_cpu;
      logic   exp_ref;
      @(negedge clk);
      wr_en = 1; wr_bank = bank; wr_addr = AW'(i); wr_data = 8'($urandom);
      cpu_re = check_cpu; cpu_bank = 1'($urandom); cpu_addr = AW'($urandom_range(0, N - 1));
      exp_prev = ref_mem[!bank][i];
      exp_ref  = capture_on && (cpu_bank == bank);
      exp_cpu  = exp_ref ? 8'h00 : ref_mem[cpu_bank][cpu_addr];
      @(posedge clk);
      ref_mem[bank][i] = wr_data;
      #1;
      if (check_prev) begin chk(prev_data == exp_prev, "previous-field byte"); n_prev++; end
      if (check_cpu) begin
        chk(cpu_rvalid, "cpu_rvalid");
        chk(cpu_conflict == exp_ref, "conflict flag");
        chk(cpu_rdata == exp_cpu, "cpu read data");
        if (exp_ref) n_conflict++;
      end
    end
    @(negedge clk); wr_en = 0; cpu_re = 0;
    @(posedge clk); #1 if (check_cpu) chk(!cpu_rvalid, "rvalid drops");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // before capture: write both banks directly, no refusals
    write_field(0, 0, 0);
    write_field(1, 1, 0);
    capture_on = 1;
    for (int f = 0; f < 6; f++) write_field(1'(f), 1, 1);
    chk(n_conflict > 10, "conflicts occurred");
    chk(n_prev == 7 * N, "previous-field reads counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
