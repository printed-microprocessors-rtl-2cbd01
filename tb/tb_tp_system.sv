// tb_tp_system: end-to-end test of the printed TP-ISA system in three builds.
//
//  * u_avg: the standard 8-bit, 2-BAR system running intAvg8, the average of
//    16 bytes held at 0x40..0x4F. The program stores the array address in a
//    pointer word and loads BAR 1 from it with SETBAR, sums the array with
//    BAR-relative ADD and an ADC carry chain into 16 bits and divides by 16
//    with four RRC pairs; 48 instructions before the final branch, 48 cycles.
//  * u_ps: a program-specific build for the multiply program: 5-bit PC, no
//    BAR, only the Zero and Carry flags, 5-bit operands (18-bit instructions)
//    and a 32-word data memory.
//  * u_mlc: the standard system with a two-bits-per-dot instruction ROM read
//    through ADCs, running the default multiply program.
// Results and cycle counts are compared with values computed here. The
// testbench counts how often each mechanism occurred (SETBAR, BAR-relative
// access, taken and untaken branches, carry-in use, flag-only instructions,
// each build completing a run) and fails if one never did.
module tb_tp_system;
  import tp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_setbar = 0, n_bar_rel = 0, n_taken = 0, n_not_taken = 0, n_carry_in = 0;
  int n_flag_only = 0, n_avg_runs = 0, n_ps_runs = 0, n_mlc_runs = 0;

  // ---- standard build, intAvg8 -------------------------------------------
  logic        a_rst_n = 0, a_run = 0, a_we = 0, a_taken, a_dwe;
  logic [7:0]  a_addr = 0, a_wdata = 0, a_rdata, a_pc;
  logic [23:0] a_instr;
  flags_t      a_flags;

  tp_system #(.PROGRAM("tb/tp_prog_intavg8.hex")) u_avg (
    .clk(clk), .rst_n(a_rst_n), .run(a_run), .ext_we(a_we), .ext_addr(a_addr),
    .ext_wdata(a_wdata), .ext_rdata(a_rdata), .pc(a_pc), .instr(a_instr),
    .flags(a_flags), .branch_taken(a_taken), .dmem_we(a_dwe)
  );

  // ---- program-specific build, mult8 -------------------------------------
  logic        p_rst_n = 0, p_run = 0, p_we = 0, p_taken, p_dwe;
  logic [4:0]  p_addr = 0, p_pc;
  logic [7:0]  p_wdata = 0, p_rdata;
  logic [17:0] p_instr;
  flags_t      p_flags;

  tp_system #(.PC_W(5), .NUM_BARS(1), .OP1_W(5), .OP2_W(5), .DMEM_DEPTH(32),
              .FLAG_MASK(4'b0110), .PROGRAM("tb/tp_prog_mult8_ps.hex")) u_ps (
    .clk(clk), .rst_n(p_rst_n), .run(p_run), .ext_we(p_we), .ext_addr(p_addr),
    .ext_wdata(p_wdata), .ext_rdata(p_rdata), .pc(p_pc), .instr(p_instr),
    .flags(p_flags), .branch_taken(p_taken), .dmem_we(p_dwe)
  );

  // ---- multi-level ROM build, mult8 --------------------------------------
  logic        m_rst_n = 0, m_run = 0, m_we = 0, m_taken, m_dwe;
  logic [7:0]  m_addr = 0, m_wdata = 0, m_rdata, m_pc;
  logic [23:0] m_instr;
  flags_t      m_flags;

  tp_system #(.ROM_BITS_PER_DOT(2)) u_mlc (
    .clk(clk), .rst_n(m_rst_n), .run(m_run), .ext_we(m_we), .ext_addr(m_addr),
    .ext_wdata(m_wdata), .ext_rdata(m_rdata), .pc(m_pc), .instr(m_instr),
    .flags(m_flags), .branch_taken(m_taken), .dmem_we(m_dwe)
  );

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, from the standard-format instruction stream.
  always @(posedge clk) begin
    if (a_run) begin
      if (a_instr[23:20] == 4'd8) n_setbar++;
      if (a_instr[23:20] <= 4'd7 && (a_instr[15] || a_instr[7])) n_bar_rel++;
      if (a_instr[23:20] <= 4'd6 && a_instr[18] && a_flags.c) n_carry_in++;
      if (a_instr[23:20] <= 4'd6 && !a_instr[19]) n_flag_only++;
    end
    if (m_run && m_instr[23:20] == 4'd9 && m_instr[15:8] != m_pc) begin
      if (m_taken) n_taken++; else n_not_taken++;
    end
    if (m_run && m_instr[23:20] <= 4'd6 && m_instr[18] && m_flags.c) n_carry_in++;
  end

  task automatic run_avg(input logic [7:0] vals [16]);
    int sum, cycles;
    logic [7:0] res;
    a_run = 0; a_rst_n = 0; @(negedge clk); a_rst_n = 1;
    sum = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); a_we = 1; a_addr = 8'(64 + i); a_wdata = vals[i]; sum += int'(vals[i]);
      @(negedge clk); a_we = 0;
    end
    @(negedge clk); a_run = 1; cycles = 0;
    while (!(a_taken && a_instr[15:8] == a_pc) && cycles < 1000) begin @(posedge clk); #1 cycles++; end
    @(negedge clk); a_run = 0; a_addr = 8'd32; #1 res = a_rdata;
    checks += 2;
    if (res !== 8'(sum / 16)) begin failures++; $display("FAIL intAvg8 %0d expected %0d", res, sum / 16); end
    if (cycles != 48) begin failures++; $display("FAIL intAvg8 took %0d cycles, expected 48", cycles); end
    n_avg_runs++;
  endtask

  task automatic run_ps(input logic [7:0] a, input logic [7:0] b);
    int cycles;
    logic [7:0] lo, hi;
    p_run = 0; p_rst_n = 0; @(negedge clk); p_rst_n = 1;
    @(negedge clk); p_we = 1; p_addr = 5'd16; p_wdata = a;
    @(negedge clk); p_addr = 5'd17; p_wdata = b;
    @(negedge clk); p_we = 0; p_run = 1; cycles = 0;
    while (!(p_taken && p_instr[9:5] == p_pc) && cycles < 1000) begin @(posedge clk); #1 cycles++; end
    @(negedge clk); p_run = 0; p_addr = 5'd18; #1 lo = p_rdata;
    p_addr = 5'd19; #1 hi = p_rdata;
    checks += 2;
    if ({hi, lo} !== 16'(int'(a) * int'(b))) begin
      failures++; $display("FAIL PS %0d * %0d = %0d", a, b, {hi, lo});
    end
    if (cycles != 66 + 2 * $countones(b)) begin failures++; $display("FAIL PS cycles %0d", cycles); end
    checks++;
    if (p_flags.s !== 1'b0 || p_flags.v !== 1'b0) begin failures++; $display("FAIL PS removed flag set"); end
    n_ps_runs++;
  endtask

  task automatic run_mlc(input logic [7:0] a, input logic [7:0] b);
    int cycles;
    logic [7:0] lo, hi;
    m_run = 0; m_rst_n = 0; @(negedge clk); m_rst_n = 1;
    @(negedge clk); m_we = 1; m_addr = 8'h10; m_wdata = a;
    @(negedge clk); m_addr = 8'h11; m_wdata = b;
    @(negedge clk); m_we = 0; m_run = 1; cycles = 0;
    while (!(m_taken && m_instr[15:8] == m_pc) && cycles < 1000) begin @(posedge clk); #1 cycles++; end
    @(negedge clk); m_run = 0; m_addr = 8'h12; #1 lo = m_rdata;
    m_addr = 8'h13; #1 hi = m_rdata;
    checks += 2;
    if ({hi, lo} !== 16'(int'(a) * int'(b))) begin
      failures++; $display("FAIL MLC %0d * %0d = %0d", a, b, {hi, lo});
    end
    if (cycles != 66 + 2 * $countones(b)) begin failures++; $display("FAIL MLC cycles %0d", cycles); end
    n_mlc_runs++;
  endtask

  initial begin
    logic [7:0] vals [16];
    repeat (2) @(negedge clk);
    for (int i = 0; i < 16; i++) vals[i] = 8'hff;
    run_avg(vals);
    for (int r = 0; r < 40; r++) begin
      for (int i = 0; i < 16; i++) vals[i] = 8'($urandom);
      run_avg(vals);
    end
    run_ps(8'd255, 8'd255);
    for (int r = 0; r < 40; r++) run_ps(8'($urandom), 8'($urandom));
    run_mlc(8'd255, 8'd255);
    for (int r = 0; r < 40; r++) run_mlc(8'($urandom), 8'($urandom));
    $display("mechanisms: setbar=%0d bar_relative=%0d taken=%0d not_taken=%0d carry_in=%0d flag_only=%0d",
             n_setbar, n_bar_rel, n_taken, n_not_taken, n_carry_in, n_flag_only);
    $display("runs: standard=%0d program_specific=%0d mlc_rom=%0d", n_avg_runs, n_ps_runs, n_mlc_runs);
    checks++;
    if (n_setbar == 0 || n_bar_rel == 0 || n_taken == 0 || n_not_taken == 0 || n_carry_in == 0 ||
        n_flag_only == 0 || n_avg_runs == 0 || n_ps_runs == 0 || n_mlc_runs == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
