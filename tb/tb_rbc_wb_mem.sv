// Unit test of rbc_wb_mem: the reset walk must take one cycle per block and
// leave every block zero (also after blocks were written and init is
// requested again); blocks written afterwards must read back with their tag.
module tb_rbc_wb_mem;
  localparam int unsigned PID_BITS = 1, LINE_BITS = 3, WA_BITS = 2, NBITS = 16, TAG_BITS = 8;
  localparam int unsigned NBLK = 2**(PID_BITS + LINE_BITS + WA_BITS);
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, busy, rd = 1'b0, wr = 1'b0;
  logic [PID_BITS-1:0] pid = '0;
  logic [LINE_BITS-1:0] line = '0;
  logic [WA_BITS-1:0] wa = '0;
  logic [TAG_BITS-1:0] wtag = '0, rtag;
  logic [NBITS-1:0] wbits = '0, rbits;
  logic [TAG_BITS+NBITS-1:0] model [NBLK];
  int checks = 0, failures = 0;

  rbc_wb_mem #(.PID_BITS(PID_BITS), .LINE_BITS(LINE_BITS), .WA_BITS(WA_BITS), .NBITS(NBITS),
               .TAG_BITS(TAG_BITS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic wait_walk(input int expect_cycles);
    int n = 0;
    while (busy) begin @(negedge clk); n++; end
    chk(n == expect_cycles, $sformatf("walk took %0d cycles, want %0d", n, expect_cycles));
  endtask

  task automatic read_all_zero();
    for (int a = 0; a < int'(NBLK); a++) begin
      @(negedge clk); {pid, line, wa} = (PID_BITS+LINE_BITS+WA_BITS)'(a); rd = 1;
      @(negedge clk); rd = 0;
      chk(rtag == 0 && rbits == 0, $sformatf("block %0d not cleared", a));
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    wait_walk(NBLK);
    read_all_zero();
    // random traffic
    for (int a = 0; a < int'(NBLK); a++) model[a] = '0;
    for (int n = 0; n < 600; n++) begin
      automatic int a = int'($urandom_range(NBLK - 1, 0));
      @(negedge clk);
      {pid, line, wa} = (PID_BITS+LINE_BITS+WA_BITS)'(a);
      if ($urandom_range(1, 0)) begin
        wtag = TAG_BITS'($urandom); wbits = NBITS'($urandom); wr = 1;
        model[a] = {wtag, wbits};
        @(negedge clk); wr = 0;
      end else begin
        rd = 1;
        @(negedge clk); rd = 0;
        chk({rtag, rbits} == model[a], $sformatf("block %0d read %h want %h", a, {rtag, rbits}, model[a]));
      end
    end
    // RESET clears again
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    wait_walk(NBLK);
    read_all_zero();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
