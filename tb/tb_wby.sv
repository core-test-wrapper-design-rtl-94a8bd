// tb_wby: self-checking testbench of the wrapper bypass register bit.
// With hold_en high the output must equal the input of the previous clock;
// with hold_en low it must keep its value. 400 random clocks.
module tb_wby;
  logic clk = 0, hold_en, wby_in, wby_out;
  int checks = 0, failures = 0;
  logic ref_q;
  int n_load = 0, n_keep = 0;

  wby dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    hold_en = 1; wby_in = 0;
    @(posedge clk); ref_q = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      {hold_en, wby_in} = 2'($urandom);
      checks++;
      if (wby_out !== ref_q) begin failures++; $display("t=%0d out %b exp %b", t, wby_out, ref_q); end
      if (hold_en) n_load++; else n_keep++;
      @(posedge clk);
      if (hold_en) ref_q = wby_in;
    end
    if (n_load == 0 || n_keep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
