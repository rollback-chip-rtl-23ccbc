// Unit test of rbc_sram: random writes and reads against an array model;
// read data must appear exactly one cycle after the read.
module tb_rbc_sram;
  localparam int unsigned AW = 6, DW = 16;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  rbc_sram #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill everything so that every read has a known value
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); en = 1; we = 1; addr = AW'(a); wdata = DW'($urandom); model[a] = wdata;
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en = $urandom_range(3, 0) != 0; we = $urandom_range(1, 0) == 1;
      addr = AW'($urandom); wdata = DW'($urandom);
      if (en && we) model[addr] = wdata;
      if (en && !we) begin
        automatic logic [DW-1:0] exp = model[addr];
        @(negedge clk); en = 0;
        checks++;
        if (rdata !== exp) begin failures++; $display("addr %0d got %h want %h", addr, rdata, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
