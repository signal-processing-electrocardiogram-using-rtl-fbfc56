// tb_bitplane_memory: self-checking test of the bit-plane memory.
// Writes random bit-slices with random per-PE enables to random addresses,
// keeps a reference copy, and checks both asynchronous read ports, including
// read-before-write on the address being written.
module tb_bitplane_memory;
  localparam int unsigned N = 16, DEPTH = 1024, AW = 10;
  logic clk = 1'b0;
  logic [AW-1:0] ra1 = '0, ra2 = '0, wa = '0;
  logic [N-1:0]  rd1, rd2, wbe = '0, wd = '0;
  logic [N-1:0]  ref_mem [DEPTH];
  int checks = 0, failures = 0;

  bitplane_memory #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every address
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wa = AW'(a); wd = N'($urandom); wbe = '1;
      ref_mem[a] = wd;
    end
    @(negedge clk); wbe = '0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      ra1 = AW'($urandom); ra2 = AW'($urandom);
      wa  = (n % 3 == 0) ? ra1 : AW'($urandom);
      wd  = N'($urandom); wbe = N'($urandom);
      #1;
      checks += 2;
      if (rd1 !== ref_mem[ra1]) begin failures++; $display("FAIL rd1 @%0d", ra1); end
      if (rd2 !== ref_mem[ra2]) begin failures++; $display("FAIL rd2 @%0d", ra2); end
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) if (wbe[k]) ref_mem[wa][k] = wd[k];
      ra1 = wa; #1;
      checks++;
      if (rd1 !== ref_mem[wa]) begin failures++; $display("FAIL write @%0d", wa); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
