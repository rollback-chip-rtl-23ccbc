// Unit test of rbc_mem_ctrl: the rollback-chip line port and the CPU word
// port issue random reads and writes at the same time through the
// controller to a DRAM model; every read is compared with a model of each
// port's region, and when both wait the grants must alternate.
module tb_rbc_mem_ctrl;
  localparam int unsigned PA_BITS = 5, WORD_W = 32, WOFF_BITS = 2, NW = 4, LW = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  logic r_req = 0, r_we = 0, r_ack; logic [PA_BITS-1:0] r_addr = '0;
  logic [LW-1:0] r_wdata = '0, r_rdata;
  logic c_req = 0, c_we = 0, c_ack; logic [PA_BITS+WOFF_BITS-1:0] c_addr = '0;
  logic [WORD_W-1:0] c_wdata = '0, c_rdata;
  logic mem_req, mem_we, mem_ack; logic [PA_BITS:0] mem_addr;
  logic [LW-1:0] mem_wdata, mem_rdata; logic [NW-1:0] mem_wstrb;
  logic [LW-1:0] rmodel [2**PA_BITS];
  logic [WORD_W-1:0] cmodel [2**(PA_BITS+WOFF_BITS)];
  int checks = 0, failures = 0, both = 0, alternations = 0;
  bit r_done = 0, c_done = 0;
  logic last_grant = 1;

  rbc_mem_ctrl #(.PA_BITS(PA_BITS), .WORD_W(WORD_W), .WOFF_BITS(WOFF_BITS)) dut (.*);
  rbc_bulk_mem_model #(.AW(PA_BITS+1), .WORD_W(WORD_W), .NW(NW), .LAT_MAX(4)) mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .wstrb(mem_wstrb),
    .ack(mem_ack), .rdata(mem_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // grant order when both requesters wait at the start of a transfer
  logic prev_req = 0, prev_r = 0, prev_c = 0;
  always @(posedge clk) begin
    if (mem_req && !prev_req) begin
      if (prev_r && prev_c) begin
        both++;
        checks++;
        if (mem_addr[PA_BITS] == last_grant) begin failures++; $display("grant did not alternate"); end
        else alternations++;
      end
      last_grant = mem_addr[PA_BITS];
    end
    prev_req = mem_req; prev_r = r_req; prev_c = c_req;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int i = 0; i < 2**PA_BITS; i++) rmodel[i] = '0;
    for (int i = 0; i < 2**(PA_BITS+WOFF_BITS); i++) cmodel[i] = '0;
    @(negedge clk); rst_n = 1;
    fork
      begin
        for (int n = 0; n < 400; n++) begin
          automatic int a = int'($urandom_range(2**PA_BITS - 1, 0));
          automatic bit we = $urandom_range(1, 0) == 1;
          automatic logic [LW-1:0] d = {$urandom, $urandom, $urandom, $urandom};
          @(negedge clk); r_req = 1; r_we = we; r_addr = PA_BITS'(a); r_wdata = d;
          do @(negedge clk); while (!r_ack);
          r_req = 0;
          if (we) rmodel[a] = d;
          else chk(r_rdata == rmodel[a], $sformatf("line read %0d", a));
        end
        r_done = 1;
      end
      begin
        for (int n = 0; n < 400; n++) begin
          automatic int a = int'($urandom_range(2**(PA_BITS+WOFF_BITS) - 1, 0));
          automatic bit we = $urandom_range(1, 0) == 1;
          automatic logic [WORD_W-1:0] d = $urandom;
          @(negedge clk); c_req = 1; c_we = we; c_addr = (PA_BITS+WOFF_BITS)'(a); c_wdata = d;
          do @(negedge clk); while (!c_ack);
          c_req = 0;
          if (we) cmodel[a] = d;
          else chk(c_rdata == cmodel[a], $sformatf("word read %0d", a));
        end
        c_done = 1;
      end
    join
    chk(both > 0, "both requesters waited at least once");
    $display("contended grants %0d alternations %0d", both, alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
