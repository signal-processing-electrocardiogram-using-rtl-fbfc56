// tb_io_register_bank: self-checking test of the I/O shift registers.
// 1. The front end writes 16 random words (one cycle each), reads them back,
//    then 8 shift_out cycles must present bit-slice i = bit i of every word.
// 2. 8 shift_in cycles of random slices must assemble the transposed words.
// 3. The serial chain must delay a random bit stream by N*W cycles.
module tb_io_register_bank;
  localparam int unsigned N = 16, W = 8, NAW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fe_we = 1'b0; logic [NAW-1:0] fe_addr = '0; logic [W-1:0] fe_wdata = '0, fe_rdata;
  logic shift_out = 1'b0, shift_in = 1'b0, ser_en = 1'b0, ser_in = 1'b0, ser_out;
  logic [N-1:0] slice_out, slice_in = '0;
  logic [W-1:0] words [N];
  logic [N-1:0] slices [W];
  logic stream [N*W*3];
  int checks = 0, failures = 0;

  io_register_bank #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int k = 0; k < N; k++) begin
        words[k] = W'($urandom);
        @(negedge clk); fe_we = 1'b1; fe_addr = NAW'(k); fe_wdata = words[k];
      end
      @(negedge clk); fe_we = 1'b0;
      for (int k = 0; k < N; k++) begin
        fe_addr = NAW'(k); #1;
        check(fe_rdata == words[k], "front-end read back");
      end
      @(negedge clk);
      for (int i = 0; i < W; i++) begin
        logic [N-1:0] exp_s;
        for (int k = 0; k < N; k++) exp_s[k] = words[k][i];
        check(slice_out == exp_s, $sformatf("slice %0d out", i));
        shift_out = 1'b1;
        @(negedge clk);
        shift_out = 1'b0;
      end
      for (int i = 0; i < W; i++) begin
        slices[i] = N'($urandom);
        slice_in = slices[i]; shift_in = 1'b1;
        @(negedge clk);
      end
      shift_in = 1'b0;
      for (int k = 0; k < N; k++) begin
        logic [W-1:0] exp_w;
        for (int i = 0; i < W; i++) exp_w[i] = slices[i][k];
        fe_addr = NAW'(k); #1;
        check(fe_rdata == exp_w, "slice to word");
      end
      @(negedge clk);
    end
    // serial chain
    for (int t = 0; t < N*W*3; t++) begin
      stream[t] = 1'($urandom);
      ser_in = stream[t]; ser_en = 1'b1;
      if (t >= N*W) check(ser_out == stream[t - N*W], "serial chain delay");
      @(negedge clk);
    end
    ser_en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
