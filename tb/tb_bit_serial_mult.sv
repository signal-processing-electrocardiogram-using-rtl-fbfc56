// tb_bit_serial_mult: self-checking test of the carry-save bit-serial
// multiplier at its full 32-bit width.
// For random and corner operand pairs it clears the multiplier, shifts the
// multiplicand in MSB first (32 cycles), applies the multiplier LSB first and
// then 32 zero bits (64 steps), collects the 64 product bits from `out` after
// each step and compares them with a*b computed by the simulator. It also
// checks that one product takes exactly W + 2W = 96 active cycles.
module tb_bit_serial_mult;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, load = 1'b0, step = 1'b0, in = 1'b0;
  logic out;
  int checks = 0, failures = 0;

  bit_serial_mult #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic multiply(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [2*W-1:0] p, expect_p;
    int cycles;
    cycles = 0;
    @(negedge clk); clr = 1'b1;
    @(negedge clk); clr = 1'b0; load = 1'b1;
    for (int i = W-1; i >= 0; i--) begin
      in = a[i];
      @(negedge clk); cycles++;
    end
    load = 1'b0; step = 1'b1;
    for (int t = 0; t < 2*W; t++) begin
      in = (t < W) ? b[t] : 1'b0;
      @(negedge clk); cycles++;
      p[t] = out;
    end
    step = 1'b0;
    expect_p = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    checks++;
    if (p !== expect_p) begin
      failures++;
      $display("FAIL %h * %h = %h, got %h", a, b, expect_p, p);
    end
    checks++;
    if (cycles != 3*W) begin
      failures++;
      $display("FAIL cycle count %0d", cycles);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    multiply('1, '1);
    multiply(32'd1, 32'd1);
    multiply('0, 32'h1234_5678);
    multiply(32'h8000_0000, 32'h8000_0000);
    multiply(32'd410, 32'd2048);
    for (int n = 0; n < 300; n++) multiply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
