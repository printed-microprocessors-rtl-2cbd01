// tb_tp_wide: wider cores from the datapath-width / BAR-count design space.
//
// The same shift-and-add multiply runs natively on a 16-bit core with two
// BARs (16 x 16 -> 32 bits) and on a 32-bit core with four BARs
// (32 x 32 -> 64 bits). Operands go to words 0x10 and 0x11; the product is
// read from 0x12 (low) and 0x13 (high). With one instruction per cycle a run
// lasts 10 + 7 * N + 2 * popcount(B) cycles for N-bit data.
// A third system, the standard 8-bit core, computes the same 16 x 16 -> 32-bit
// product by data coalescing: operands and product are split into bytes and
// carried through ADD/ADC chains and RRC/RLC rotates through carry. Operands
// at 0x10/0x11 (A) and 0x14/0x15 (B), product at 0x18..0x1B, low byte first;
// 17 + 16 * 11 + 4 * popcount(B) cycles.
// A fourth system, also the standard 8-bit core, runs tHold16 by coalescing:
// it counts how many of 16 two-byte words at 0x40..0x5F (low byte first)
// exceed the 16-bit threshold at 0x30/0x31, comparing low bytes with a
// compare and high bytes with a compare-with-borrow; count at 0x21,
// 117 + hits cycles.
// A fifth 8-bit system runs intAvg16 by coalescing: the 16 two-byte words at
// 0x40..0x5F are summed into 24 bits with ADD/ADC/ADC, shifted right by 4
// through carry, and the 16-bit average is left at 0x20/0x21; straight-line
// code, 71 cycles.
// A sixth 8-bit system runs div16 by coalescing: restoring division of the
// 16-bit word at 0x10/0x11 by the one at 0x14/0x15, shifting with RLC chains,
// comparing with CMP/CPB and subtracting with SUB/SBB; quotient at
// 0x18/0x19, remainder at 0x1A/0x1B. Each of the 16 steps takes 11 cycles,
// 14 when the partial remainder fits in 16 bits and is at least the
// divisor; plus 9.
module tb_tp_wide;
  import tp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        h_rst_n = 0, h_run = 0, h_we = 0, h_taken, h_dwe;
  logic [7:0]  h_addr = 0, h_pc;
  logic [15:0] h_wdata = 0, h_rdata;
  logic [23:0] h_instr;
  flags_t      h_flags;

  tp_system #(.DATA_W(16), .PROGRAM("tb/tp_prog_mult16.hex")) u_16 (
    .clk(clk), .rst_n(h_rst_n), .run(h_run), .ext_we(h_we), .ext_addr(h_addr),
    .ext_wdata(h_wdata), .ext_rdata(h_rdata), .pc(h_pc), .instr(h_instr),
    .flags(h_flags), .branch_taken(h_taken), .dmem_we(h_dwe)
  );

  logic        w_rst_n = 0, w_run = 0, w_we = 0, w_taken, w_dwe;
  logic [7:0]  w_addr = 0, w_pc;
  logic [31:0] w_wdata = 0, w_rdata;
  logic [23:0] w_instr;
  flags_t      w_flags;

  tp_system #(.DATA_W(32), .NUM_BARS(4), .PROGRAM("tb/tp_prog_mult32_4bar.hex")) u_32 (
    .clk(clk), .rst_n(w_rst_n), .run(w_run), .ext_we(w_we), .ext_addr(w_addr),
    .ext_wdata(w_wdata), .ext_rdata(w_rdata), .pc(w_pc), .instr(w_instr),
    .flags(w_flags), .branch_taken(w_taken), .dmem_we(w_dwe)
  );

  logic        c_rst_n = 0, c_run = 0, c_we = 0, c_taken, c_dwe;
  logic [7:0]  c_addr = 0, c_pc, c_wdata = 0, c_rdata;
  logic [23:0] c_instr;
  flags_t      c_flags;

  tp_system #(.PROGRAM("tb/tp_prog_mult16_on8.hex")) u_coal (
    .clk(clk), .rst_n(c_rst_n), .run(c_run), .ext_we(c_we), .ext_addr(c_addr),
    .ext_wdata(c_wdata), .ext_rdata(c_rdata), .pc(c_pc), .instr(c_instr),
    .flags(c_flags), .branch_taken(c_taken), .dmem_we(c_dwe)
  );

  logic        t_rst_n = 0, t_run = 0, t_we = 0, t_taken, t_dwe;
  logic [7:0]  t_addr = 0, t_pc, t_wdata = 0, t_rdata;
  logic [23:0] t_instr;
  flags_t      t_flags;

  tp_system #(.PROGRAM("tb/tp_prog_thold16_on8.hex")) u_thold (
    .clk(clk), .rst_n(t_rst_n), .run(t_run), .ext_we(t_we), .ext_addr(t_addr),
    .ext_wdata(t_wdata), .ext_rdata(t_rdata), .pc(t_pc), .instr(t_instr),
    .flags(t_flags), .branch_taken(t_taken), .dmem_we(t_dwe)
  );

  logic        v_rst_n = 0, v_run = 0, v_we = 0, v_taken, v_dwe;
  logic [7:0]  v_addr = 0, v_pc, v_wdata = 0, v_rdata;
  logic [23:0] v_instr;
  flags_t      v_flags;

  tp_system #(.PROGRAM("tb/tp_prog_intavg16_on8.hex")) u_avg (
    .clk(clk), .rst_n(v_rst_n), .run(v_run), .ext_we(v_we), .ext_addr(v_addr),
    .ext_wdata(v_wdata), .ext_rdata(v_rdata), .pc(v_pc), .instr(v_instr),
    .flags(v_flags), .branch_taken(v_taken), .dmem_we(v_dwe)
  );

  logic        d_rst_n = 0, d_run = 0, d_we = 0, d_taken, d_dwe;
  logic [7:0]  d_addr = 0, d_pc, d_wdata = 0, d_rdata;
  logic [23:0] d_instr;
  flags_t      d_flags;

  tp_system #(.PROGRAM("tb/tp_prog_div16_on8.hex")) u_div (
    .clk(clk), .rst_n(d_rst_n), .run(d_run), .ext_we(d_we), .ext_addr(d_addr),
    .ext_wdata(d_wdata), .ext_rdata(d_rdata), .pc(d_pc), .instr(d_instr),
    .flags(d_flags), .branch_taken(d_taken), .dmem_we(d_dwe)
  );

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul16(input logic [15:0] a, input logic [15:0] b);
    int cycles;
    logic [15:0] lo, hi;
    h_run = 0; h_rst_n = 0; @(negedge clk); h_rst_n = 1;
    @(negedge clk); h_we = 1; h_addr = 8'h10; h_wdata = a;
    @(negedge clk); h_addr = 8'h11; h_wdata = b;
    @(negedge clk); h_we = 0; h_run = 1; cycles = 0;
    while (!(h_taken && h_instr[15:8] == h_pc) && cycles < 2000) begin @(posedge clk); #1 cycles++; end
    @(negedge clk); h_run = 0; h_addr = 8'h12; #1 lo = h_rdata;
    h_addr = 8'h13; #1 hi = h_rdata;
    checks += 2;
    if ({hi, lo} !== 32'(a) * 32'(b)) begin failures++; $display("FAIL 16-bit %0d * %0d = %0d", a, b, {hi, lo}); end
    if (cycles != 10 + 7 * 16 + 2 * $countones(b)) begin failures++; $display("FAIL 16-bit cycles %0d", cycles); end
  endtask

  task automatic mul32(input logic [31:0] a, input logic [31:0] b);
    int cycles;
    logic [31:0] lo, hi;
    w_run = 0; w_rst_n = 0; @(negedge clk); w_rst_n = 1;
    @(negedge clk); w_we = 1; w_addr = 8'h10; w_wdata = a;
    @(negedge clk); w_addr = 8'h11; w_wdata = b;
    @(negedge clk); w_we = 0; w_run = 1; cycles = 0;
    while (!(w_taken && w_instr[15:8] == w_pc) && cycles < 2000) begin @(posedge clk); #1 cycles++; end
    @(negedge clk); w_run = 0; w_addr = 8'h12; #1 lo = w_rdata;
    w_addr = 8'h13; #1 hi = w_rdata;
    checks += 2;
    if ({hi, lo} !== 64'(a) * 64'(b)) begin failures++; $display("FAIL 32-bit %0d * %0d = %0d", a, b, {hi, lo}); end
    if (cycles != 10 + 7 * 32 + 2 * $countones(b)) begin failures++; $display("FAIL 32-bit cycles %0d", cycles); end
  endtask

  task automatic mul16_on8(input logic [15:0] a, input logic [15:0] b);
    int cycles;
    logic [31:0] p;
    c_run = 0; c_rst_n = 0; @(negedge clk); c_rst_n = 1;
    @(negedge clk); c_we = 1; c_addr = 8'h10; c_wdata = a[7:0];
    @(negedge clk); c_addr = 8'h11; c_wdata = a[15:8];
    @(negedge clk); c_addr = 8'h14; c_wdata = b[7:0];
    @(negedge clk); c_addr = 8'h15; c_wdata = b[15:8];
    @(negedge clk); c_we = 0; c_run = 1; cycles = 0;
    while (!(c_taken && c_instr[15:8] == c_pc) && cycles < 2000) begin @(posedge clk); #1 cycles++; end
    @(negedge clk); c_run = 0;
    for (int i = 0; i < 4; i++) begin
      c_addr = 8'(8'h18 + i); #1 p[8*i +: 8] = c_rdata;
    end
    checks += 2;
    if (p !== 32'(a) * 32'(b)) begin failures++; $display("FAIL coalesced %0d * %0d = %0d", a, b, p); end
    if (cycles != 17 + 16 * 11 + 4 * $countones(b)) begin failures++; $display("FAIL coalesced cycles %0d", cycles); end
  endtask

  // near = 1 makes elements differ from the threshold only in the low byte,
  // so the borrow from the low bytes decides the compare.
  task automatic thold16_on8(input logic [15:0] t, input bit near);
    int cycles, hits;
    logic [15:0] v;
    t_run = 0; t_rst_n = 0; @(negedge clk); t_rst_n = 1;
    @(negedge clk); t_we = 1; t_addr = 8'h30; t_wdata = t[7:0];
    @(negedge clk); t_addr = 8'h31; t_wdata = t[15:8];
    hits = 0;
    for (int i = 0; i < 16; i++) begin
      v = near ? {t[15:8], 8'($urandom)} : 16'($urandom);
      if (v > t) hits++;
      @(negedge clk); t_addr = 8'(8'h40 + 2 * i); t_wdata = v[7:0];
      @(negedge clk); t_addr = 8'(8'h41 + 2 * i); t_wdata = v[15:8];
    end
    @(negedge clk); t_we = 0; t_run = 1; cycles = 0;
    while (!(t_taken && t_instr[15:8] == t_pc) && cycles < 2000) begin @(posedge clk); #1 cycles++; end
    @(negedge clk); t_run = 0; t_addr = 8'h21; #1;
    checks += 2;
    if (int'(t_rdata) != hits) begin failures++; $display("FAIL tHold16 count %0d, expected %0d", t_rdata, hits); end
    if (cycles != 117 + hits) begin failures++; $display("FAIL tHold16 cycles %0d", cycles); end
  endtask

  task automatic intavg16_on8(input bit all_ones);
    int cycles;
    int unsigned sum;
    logic [15:0] v, avg;
    v_run = 0; v_rst_n = 0; @(negedge clk); v_rst_n = 1;
    sum = 0;
    for (int i = 0; i < 16; i++) begin
      v = all_ones ? 16'hffff : 16'($urandom);
      sum += 32'(v);
      @(negedge clk); v_we = 1; v_addr = 8'(8'h40 + 2 * i); v_wdata = v[7:0];
      @(negedge clk); v_addr = 8'(8'h41 + 2 * i); v_wdata = v[15:8];
    end
    @(negedge clk); v_we = 0; v_run = 1; cycles = 0;
    while (!(v_taken && v_instr[15:8] == v_pc) && cycles < 2000) begin @(posedge clk); #1 cycles++; end
    @(negedge clk); v_run = 0; v_addr = 8'h20; #1 avg[7:0] = v_rdata;
    v_addr = 8'h21; #1 avg[15:8] = v_rdata;
    checks += 2;
    if (avg != 16'(sum / 16)) begin failures++; $display("FAIL intAvg16 %0d, expected %0d", avg, sum / 16); end
    if (cycles != 71) begin failures++; $display("FAIL intAvg16 cycles %0d", cycles); end
  endtask

  task automatic div16_on8(input logic [15:0] n, input logic [15:0] d);
    int cycles, exp_cycles;
    int unsigned rem;
    logic [15:0] q, r;
    d_run = 0; d_rst_n = 0; @(negedge clk); d_rst_n = 1;
    @(negedge clk); d_we = 1; d_addr = 8'h10; d_wdata = n[7:0];
    @(negedge clk); d_addr = 8'h11; d_wdata = n[15:8];
    @(negedge clk); d_addr = 8'h14; d_wdata = d[7:0];
    @(negedge clk); d_addr = 8'h15; d_wdata = d[15:8];
    exp_cycles = 9; rem = 0;
    for (int b = 15; b >= 0; b--) begin
      rem = rem * 2 + 32'(n[b]);
      if (rem >= 65536) begin exp_cycles += 11; rem -= 32'(d); end
      else if (rem >= 32'(d)) begin exp_cycles += 14; rem -= 32'(d); end
      else exp_cycles += 11;
    end
    @(negedge clk); d_we = 0; d_run = 1; cycles = 0;
    while (!(d_taken && d_instr[15:8] == d_pc) && cycles < 2000) begin @(posedge clk); #1 cycles++; end
    @(negedge clk); d_run = 0;
    d_addr = 8'h18; #1 q[7:0] = d_rdata;
    d_addr = 8'h19; #1 q[15:8] = d_rdata;
    d_addr = 8'h1a; #1 r[7:0] = d_rdata;
    d_addr = 8'h1b; #1 r[15:8] = d_rdata;
    checks += 3;
    if (q != n / d) begin failures++; $display("FAIL div16 %0d / %0d: q %0d", n, d, q); end
    if (r != n % d) begin failures++; $display("FAIL div16 %0d %% %0d: r %0d", n, d, r); end
    if (cycles != exp_cycles) begin failures++; $display("FAIL div16 cycles %0d, expected %0d", cycles, exp_cycles); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    div16_on8(16'hffff, 16'hfff0);
    div16_on8(16'hffff, 16'd1);
    intavg16_on8(1'b1);
    thold16_on8(16'hffff, 1'b0);
    thold16_on8(16'h0000, 1'b0);
    mul16_on8(16'hffff, 16'hffff);
    mul16(16'hffff, 16'hffff);
    mul32(32'hffffffff, 32'hffffffff);
    for (int i = 0; i < 40; i++) begin
      mul16(16'($urandom), 16'($urandom));
      mul32($urandom, $urandom);
      mul16_on8(16'($urandom), 16'($urandom));
      thold16_on8(16'($urandom), i[0]);
      intavg16_on8(1'b0);
      div16_on8(16'($urandom), (i < 20) ? 16'(1 + $urandom % 65535) : 16'(1 + $urandom % 255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
