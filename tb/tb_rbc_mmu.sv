// Unit test of rbc_mmu against a map model of the page table: ALLOC gives
// a page that no other mapping holds (fault only when every page is in use)
// and returns the same page while the mapping lives; XLATE faults exactly
// for unmapped pages; FREE of a working area drops all of its mappings and
// returns their pages.  The page-table walk at reset takes one cycle per
// entry, and pages_used must equal the number of live mappings.
module tb_rbc_mmu;
  import rbc_pkg::*;
  localparam int unsigned PID_BITS = 1, FRAME_BITS = 4, WAF_BITS = 2, LINE_BITS = 4;
  localparam int unsigned PAGE_BITS = 2, PPN_BITS = 3;
  localparam int unsigned VP_BITS = LINE_BITS - PAGE_BITS;
  localparam int unsigned NPT = 2**(PID_BITS + FRAME_BITS + VP_BITS);
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, busy, start = 1'b0, done, fault;
  mmu_op_e op = MMU_XLATE;
  logic [PID_BITS-1:0] pid = '0;
  logic [FRAME_BITS-1:0] frame = '0;
  logic [LINE_BITS-1:0] line = '0;
  logic [PPN_BITS+PAGE_BITS-1:0] paddr;
  logic [PPN_BITS:0] pages_used;
  int checks = 0, failures = 0, faults = 0, frees = 0;
  int map [int];                       // {pid, frame, vpage} -> ppn

  rbc_mmu #(.PID_BITS(PID_BITS), .FRAME_BITS(FRAME_BITS), .WAF_BITS(WAF_BITS),
            .LINE_BITS(LINE_BITS), .PAGE_BITS(PAGE_BITS), .PPN_BITS(PPN_BITS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic run(input mmu_op_e o, input int p, input int f, input int l);
    @(negedge clk); start = 1; op = o; pid = PID_BITS'(p); frame = FRAME_BITS'(f); line = LINE_BITS'(l);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    int n0 = 0;
    @(negedge clk); rst_n = 1;
    while (busy) begin @(negedge clk); n0++; end
    chk(n0 == int'(NPT), $sformatf("page-table walk %0d cycles want %0d", n0, NPT));
    for (int n = 0; n < 3000; n++) begin
      automatic int p = int'($urandom_range(1, 0));
      automatic int f = int'($urandom_range(2**FRAME_BITS - 1, 0));
      automatic int l = int'($urandom_range(2**LINE_BITS - 1, 0));
      automatic int key = (p << (FRAME_BITS + VP_BITS)) | (f << VP_BITS) | (l >> PAGE_BITS);
      automatic int r = int'($urandom_range(9, 0));
      if (r < 5) begin
        run(MMU_ALLOC, p, f, l);
        if (map.exists(key)) begin
          chk(!fault && paddr == (PPN_BITS+PAGE_BITS)'((map[key] << PAGE_BITS) | (l % (2**PAGE_BITS))), "ALLOC of mapped page");
        end else if (map.num() == 2**PPN_BITS) begin
          chk(fault, "ALLOC faults when every page is in use"); faults++;
        end else begin
          automatic int ppn = int'(paddr >> PAGE_BITS);
          automatic bit dup = 0;
          foreach (map[k]) if (map[k] == ppn) dup = 1;
          chk(!fault && !dup, "ALLOC gives a free page");
          chk(paddr[PAGE_BITS-1:0] == PAGE_BITS'(l), "line within page");
          map[key] = ppn;
        end
      end else if (r < 9) begin
        run(MMU_XLATE, p, f, l);
        chk(fault == !map.exists(key), "XLATE fault iff unmapped");
        if (map.exists(key)) chk(paddr >> PAGE_BITS == (PPN_BITS)'(map[key]), "XLATE page");
      end else begin
        automatic int wa = f >> WAF_BITS;
        run(MMU_FREE, p, f, l);
        frees++;
        foreach (map[k])
          if ((k >> (FRAME_BITS + VP_BITS)) == p && ((k >> VP_BITS) % (2**FRAME_BITS)) >> WAF_BITS == wa)
            map.delete(k);
      end
      chk(pages_used == (PPN_BITS+1)'(map.num()), $sformatf("pages used %0d want %0d", pages_used, map.num()));
    end
    chk(faults > 0 && frees > 0, "exhaustion and reclamation exercised");
    $display("faults %0d frees %0d", faults, frees);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
