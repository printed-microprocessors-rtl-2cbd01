// tb_tp_benchmarks: benchmark kernels on the standard 8-bit, 2-BAR system.
//
// Five printed systems, each with its own program ROM:
//  * tHold8: counts how many of 16 bytes (0x40..0x4F) exceed a threshold
//    (0x30); result at 0x21. A loop walks the array through BAR 1, reloaded
//    from a pointer word with SETBAR each pass. Expected time 100 + hits
//    cycles (4 set-up instructions, 6 per element plus 1 per hit).
//  * crc8: CRC-8 (polynomial 0x07, initial 0, MSB first) of 16 bytes at
//    0x40..0x4F; result at 0x22. Expected time 742 + number of polynomial
//    XORs cycles.
//  * div8: unsigned 8-bit restoring division of 0x10 by 0x11; quotient at
//    0x12, remainder at 0x13. Each of the 8 steps takes 8 cycles, 2 more when
//    the partial remainder fits in 8 bits and is at least the divisor; plus 6.
//  * inSort8: in-place ascending insertion sort of the 16 bytes at 0x40..0x4F.
//    BAR 1 points at the pair being compared (b1+0, b1+1); out-of-order pairs
//    are exchanged with three XORs. Expected time: 4 + sum over i = 1..15 of
//    9 + 9 * (moves of element i) + 3 if the element stopped before the front.
//  * dTree8: a decision tree that fills all 256 program words, its thresholds
//    held in the instructions. Heap-numbered node n (root 1) is internal for
//    n < 51, tests feature n % 8 (0x10..0x17) against (n*73 + 29) mod 256 and
//    goes to 2n+1 when the feature is at least the threshold, else to 2n;
//    leaf n writes class (n*13 + 5) mod 16 to 0x18, then 0x19 is set to 1.
//    Expected time 5 + 3 cycles per internal node on the path.
// Inputs are random; results and cycle counts are computed here from the
// algorithms, independently of the RTL.
module tb_tp_benchmarks;
  import tp_pkg::*;

  localparam int unsigned NSYS = 5;
  localparam string PROGS [NSYS] = '{"tb/tp_prog_thold8.hex", "tb/tp_prog_crc8.hex",
                                     "tb/tp_prog_div8.hex", "tb/tp_prog_insort8.hex",
                                     "tb/tp_prog_dtree8.hex"};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n [NSYS], run [NSYS], we [NSYS], taken [NSYS], dwe [NSYS];
  logic [7:0]  addr [NSYS], wdata [NSYS], rdata [NSYS], pc [NSYS];
  logic [23:0] instr [NSYS];
  flags_t      flags [NSYS];

  for (genvar g = 0; g < NSYS; g++) begin : g_sys
    tp_system #(.PROGRAM(PROGS[g])) u_sys (
      .clk(clk), .rst_n(rst_n[g]), .run(run[g]), .ext_we(we[g]), .ext_addr(addr[g]),
      .ext_wdata(wdata[g]), .ext_rdata(rdata[g]), .pc(pc[g]), .instr(instr[g]),
      .flags(flags[g]), .branch_taken(taken[g]), .dmem_we(dwe[g])
    );
  end

  int checks = 0, failures = 0;
  int n_runs [NSYS];

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic poke(input int s, input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); we[s] = 1; addr[s] = a; wdata[s] = d;
    @(negedge clk); we[s] = 0;
  endtask

  task automatic peek(input int s, input logic [7:0] a, output logic [7:0] d);
    @(negedge clk); addr[s] = a; #1 d = rdata[s];
  endtask

  // Reset, run to the closing branch-to-self, return the cycle count.
  task automatic execute(input int s, output int cycles);
    @(negedge clk); run[s] = 1; cycles = 0;
    while (!(taken[s] && instr[s][15:8] == pc[s]) && cycles < 5000) begin
      @(posedge clk); #1 cycles++;
    end
    @(negedge clk); run[s] = 0;
  endtask

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    logic [7:0] v [16];
    logic [7:0] t, r, q, crc, n, d;
    int hits, xors, cycles, exp_cycles, rem, node;
    bit depth_seen [8] = '{default: 1'b0};
    for (int s = 0; s < NSYS; s++) begin
      rst_n[s] = 0; run[s] = 0; we[s] = 0; addr[s] = 0; wdata[s] = 0; n_runs[s] = 0;
    end
    repeat (2) @(negedge clk);
    for (int iter = 0; iter < 60; iter++) begin
      // ---- tHold8 ----
      rst_n[0] = 0; @(negedge clk); rst_n[0] = 1;
      t = (iter == 0) ? 8'd255 : 8'($urandom);
      poke(0, 8'h30, t);
      hits = 0;
      for (int i = 0; i < 16; i++) begin
        v[i] = 8'($urandom); poke(0, 8'(64 + i), v[i]);
        if (v[i] > t) hits++;
      end
      execute(0, cycles);
      peek(0, 8'h21, r);
      expect_eq("tHold8 count", int'(r), hits);
      expect_eq("tHold8 cycles", cycles, 100 + hits);
      n_runs[0]++;
      // ---- crc8 ----
      rst_n[1] = 0; @(negedge clk); rst_n[1] = 1;
      crc = 0; xors = 0;
      for (int i = 0; i < 16; i++) begin
        v[i] = 8'($urandom); poke(1, 8'(64 + i), v[i]);
        crc = crc ^ v[i];
        for (int b = 0; b < 8; b++) begin
          if (crc[7]) begin crc = {crc[6:0], 1'b0} ^ 8'h07; xors++; end
          else crc = {crc[6:0], 1'b0};
        end
      end
      execute(1, cycles);
      peek(1, 8'h22, r);
      expect_eq("crc8 value", int'(r), int'(crc));
      expect_eq("crc8 cycles", cycles, 742 + xors);
      n_runs[1]++;
      // ---- div8 ----
      rst_n[2] = 0; @(negedge clk); rst_n[2] = 1;
      n = 8'($urandom); d = 8'(1 + $urandom % 255);
      if (iter == 0) begin n = 8'd255; d = 8'd200; end
      poke(2, 8'h10, n); poke(2, 8'h11, d);
      exp_cycles = 6; rem = 0;
      for (int b = 7; b >= 0; b--) begin
        rem = rem * 2 + int'(n[b]);
        if (rem >= 256) begin exp_cycles += 8; rem -= int'(d); end
        else if (rem >= int'(d)) begin exp_cycles += 10; rem -= int'(d); end
        else exp_cycles += 8;
      end
      execute(2, cycles);
      peek(2, 8'h12, q); peek(2, 8'h13, r);
      expect_eq("div8 quotient", int'(q), int'(n) / int'(d));
      expect_eq("div8 remainder", int'(r), int'(n) % int'(d));
      expect_eq("div8 cycles", cycles, exp_cycles);
      n_runs[2]++;
      // ---- inSort8 ----
      rst_n[3] = 0; @(negedge clk); rst_n[3] = 1;
      for (int i = 0; i < 16; i++) begin
        v[i] = (iter == 0) ? 8'(16 - i) : 8'($urandom);
        poke(3, 8'(64 + i), v[i]);
      end
      exp_cycles = 4;
      for (int i = 1; i < 16; i++) begin
        int k, moves;
        k = i; moves = 0;
        while (k > 0 && v[k-1] > v[k]) begin
          t = v[k]; v[k] = v[k-1]; v[k-1] = t; k--; moves++;
        end
        exp_cycles += 9 + 9 * moves + ((moves < i) ? 3 : 0);
      end
      execute(3, cycles);
      for (int i = 0; i < 16; i++) begin
        peek(3, 8'(64 + i), r);
        expect_eq("inSort8 element", int'(r), int'(v[i]));
      end
      expect_eq("inSort8 cycles", cycles, exp_cycles);
      n_runs[3]++;
      // ---- dTree8 ----
      rst_n[4] = 0; @(negedge clk); rst_n[4] = 1;
      for (int i = 0; i < 8; i++) begin
        v[i] = 8'($urandom); poke(4, 8'(16 + i), v[i]);
      end
      node = 1; exp_cycles = 5;
      while (node < 51) begin
        node = (v[node % 8] >= 8'((node * 73 + 29) % 256)) ? 2 * node + 1 : 2 * node;
        exp_cycles += 3;
      end
      execute(4, cycles);
      peek(4, 8'h18, r); peek(4, 8'h19, q);
      expect_eq("dTree8 class", int'(r), (node * 13 + 5) % 16);
      expect_eq("dTree8 valid", int'(q), 1);
      expect_eq("dTree8 cycles", cycles, exp_cycles);
      depth_seen[exp_cycles/3 - 1] = 1'b1;
      n_runs[4]++;
    end
    for (int s = 0; s < NSYS; s++) expect_eq("runs", n_runs[s] > 0 ? 1 : 0, 1);
    // Leaves lie at depth 5 and 6: both path lengths must have been taken.
    expect_eq("dTree8 depth-5 leaf reached", int'(depth_seen[5]), 1);
    expect_eq("dTree8 depth-6 leaf reached", int'(depth_seen[6]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
