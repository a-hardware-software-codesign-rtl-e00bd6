// Self-checking test of frame_ram: random writes and reads on both ports
// against a reference array, read-during-write returning the old byte, and
// addresses beyond DEPTH (written: ignored; read: 0). Uses a 50-entry memory.
module tb_frame_ram;
  localparam int unsigned DEPTH = 50;
  localparam int unsigned AW = 6;

  logic clk = 1'b0;
  logic we;
  logic [AW-1:0] waddr, raddr_a, raddr_b;
  logic [7:0] wdata, rdata_a, rdata_b;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  frame_ram #(.DEPTH(DEPTH), .DW(8), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] exp_a, exp_b;
    we = 0; waddr = 0; wdata = 0; raddr_a = 0; raddr_b = 0;
    // fill
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = 8'($urandom);
      if (i < DEPTH) model[i] = wdata;
    end
    @(negedge clk) we = 0;
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = AW'($urandom_range(0, 63));
      wdata = 8'($urandom);
      raddr_a = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom_range(0, 63));
      raddr_b = AW'($urandom_range(0, 63));
      exp_a = (raddr_a < DEPTH) ? model[raddr_a] : 8'h00;   // old data on collision
      exp_b = (raddr_b < DEPTH) ? model[raddr_b] : 8'h00;
      @(posedge clk);
      if (we && waddr < DEPTH) model[waddr] = wdata;
      #1;
      check(rdata_a, exp_a, "port a");
      check(rdata_b, exp_b, "port b");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
