// tb_wbc: self-checking testbench of the wrapper boundary cell.
// Random enables and data for 400 clocks; a reference flip-flop value is kept
// in the testbench and CFO/CTO are compared with it every clock: CTO is the
// stored bit, CFO is CFI with hold low and the stored bit with hold high; the
// stored bit takes CTI when scan_en is high, CFO otherwise.
module tb_wbc;
  logic clk = 0, scan_en, hold_en, cfi, cti, cfo, cto;
  int checks = 0, failures = 0;
  logic ref_q;
  bit   known = 0;
  int   n_shift = 0, n_hold = 0, n_pass = 0;

  wbc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {scan_en, hold_en, cfi, cti} = '0;
    @(negedge clk);
    // first clock: shift a known value in
    scan_en = 1; cti = 1;
    @(posedge clk); ref_q = 1; known = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      {scan_en, hold_en, cfi, cti} = 4'($urandom);
      #1;
      checks++;
      if (cto !== ref_q) begin failures++; $display("cto %b exp %b t=%0d", cto, ref_q, t); end
      checks++;
      if (cfo !== (hold_en ? ref_q : cfi)) begin failures++; $display("cfo mismatch t=%0d", t); end
      if (scan_en) n_shift++; else if (hold_en) n_hold++; else n_pass++;
      @(posedge clk);
      ref_q = scan_en ? cti : (hold_en ? ref_q : cfi);
    end
    if (n_shift == 0 || n_hold == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
