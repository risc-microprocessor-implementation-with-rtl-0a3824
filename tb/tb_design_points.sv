// tb_design_points: runs the same programs on the three datapath design
// points and compares their average time per instruction.
//
//   point 0: ripple-carry adder, barrel shifter, 93 ns cycle
//   point 1: 32-bit parallel prefix adder, linear shifter, 33 ns cycle
//   point 2: four 8-bit parallel prefix adders, linear shifter, 66 ns cycle
//
// Three instruction mixes are generated: a general-purpose one (about 5 %
// shifts, the rest mostly ALU, loads, stores and branches), a network-code
// one with under 1 % shifts and many branches and memory accesses, and the
// general one with every shift by 31 places, the worst case on which the
// published CPI figures are based; for that mix the cycle difference to the
// barrel-shifter point must be exactly 9 (33 ns) and 4 (66 ns) cycles per
// shift. For each point the program is executed against the reference
// model: every register write and store is compared, the cycle count must
// equal the prediction for that point's shifter timing, and the time per
// instruction (cycles x cycle time / instructions) is reported. The check
// on the outcome is the ordering that motivates the balanced design: point
// 1 fastest, point 0 slowest. Only one point runs at a time; the others are
// held in reset.
module tb_design_points;
  import tb_dlx_pkg::*;
  import dlx_pkg::*;

  localparam int NPTS    = 3;
  localparam int NRANDOM = 400;
  localparam int CYC [NPTS] = '{93, 33, 66};
  localparam bit LIN [NPTS] = '{1'b0, 1'b1, 1'b1};

  logic        clk = 1'b0;
  logic        rst_n [NPTS];
  logic [31:0] imem_addr [NPTS], dmem_addr [NPTS], dmem_wdata [NPTS], wb_data [NPTS];
  logic [31:0] imem_rdata [NPTS], dmem_rdata [NPTS];
  logic [3:0]  dmem_be [NPTS];
  logic        dmem_we [NPTS], dmem_re [NPTS], wb_we [NPTS];
  logic [4:0]  wb_rd [NPTS];
  logic        ev_retire [NPTS], ev_shift_stall [NPTS], ev_load_stall [NPTS], ev_branch_stall [NPTS];
  logic        ev_bypass_result [NPTS], ev_bypass_mdr [NPTS], ev_overflow [NPTS], ev_illegal [NPTS];
  logic        shift_busy [NPTS];

  dlx_top #(.ADDER_KIND(ADDER_RIPPLE), .SHIFTER_KIND(SHIFTER_BARREL), .CYCLE_NS(93)) u_p0 (
    .clk, .rst_n(rst_n[0]), .imem_addr(imem_addr[0]), .imem_rdata(imem_rdata[0]),
    .dmem_addr(dmem_addr[0]), .dmem_wdata(dmem_wdata[0]), .dmem_be(dmem_be[0]), .dmem_we(dmem_we[0]),
    .dmem_re(dmem_re[0]), .dmem_rdata(dmem_rdata[0]), .wb_we(wb_we[0]), .wb_rd(wb_rd[0]), .wb_data(wb_data[0]),
    .ev_retire(ev_retire[0]), .ev_shift_stall(ev_shift_stall[0]), .ev_load_stall(ev_load_stall[0]),
    .ev_branch_stall(ev_branch_stall[0]), .ev_bypass_result(ev_bypass_result[0]), .ev_bypass_mdr(ev_bypass_mdr[0]),
    .ev_overflow(ev_overflow[0]), .ev_illegal(ev_illegal[0]), .shift_busy(shift_busy[0]));
  dlx_top #(.ADDER_KIND(ADDER_PPA), .SHIFTER_KIND(SHIFTER_LINEAR), .CYCLE_NS(33)) u_p1 (
    .clk, .rst_n(rst_n[1]), .imem_addr(imem_addr[1]), .imem_rdata(imem_rdata[1]),
    .dmem_addr(dmem_addr[1]), .dmem_wdata(dmem_wdata[1]), .dmem_be(dmem_be[1]), .dmem_we(dmem_we[1]),
    .dmem_re(dmem_re[1]), .dmem_rdata(dmem_rdata[1]), .wb_we(wb_we[1]), .wb_rd(wb_rd[1]), .wb_data(wb_data[1]),
    .ev_retire(ev_retire[1]), .ev_shift_stall(ev_shift_stall[1]), .ev_load_stall(ev_load_stall[1]),
    .ev_branch_stall(ev_branch_stall[1]), .ev_bypass_result(ev_bypass_result[1]), .ev_bypass_mdr(ev_bypass_mdr[1]),
    .ev_overflow(ev_overflow[1]), .ev_illegal(ev_illegal[1]), .shift_busy(shift_busy[1]));
  dlx_top #(.ADDER_KIND(ADDER_PPA8X4), .SHIFTER_KIND(SHIFTER_LINEAR), .CYCLE_NS(66)) u_p2 (
    .clk, .rst_n(rst_n[2]), .imem_addr(imem_addr[2]), .imem_rdata(imem_rdata[2]),
    .dmem_addr(dmem_addr[2]), .dmem_wdata(dmem_wdata[2]), .dmem_be(dmem_be[2]), .dmem_we(dmem_we[2]),
    .dmem_re(dmem_re[2]), .dmem_rdata(dmem_rdata[2]), .wb_we(wb_we[2]), .wb_rd(wb_rd[2]), .wb_data(wb_data[2]),
    .ev_retire(ev_retire[2]), .ev_shift_stall(ev_shift_stall[2]), .ev_load_stall(ev_load_stall[2]),
    .ev_branch_stall(ev_branch_stall[2]), .ev_bypass_result(ev_bypass_result[2]), .ev_bypass_mdr(ev_bypass_mdr[2]),
    .ev_overflow(ev_overflow[2]), .ev_illegal(ev_illegal[2]), .shift_busy(shift_busy[2]));

  always #5 clk = ~clk;

  logic [31:0] dmem [DMEM_WORDS];
  int          cur;          // design point being run

  for (genvar k = 0; k < NPTS; k++) begin : g_mem
    assign imem_rdata[k] = prog[imem_addr[k][12:2]];
    assign dmem_rdata[k] = dmem[(dmem_addr[k] - DBASE) >> 2 & (DMEM_WORDS - 1)];
  end

  int  checks = 0, failures = 0;
  int  n_retired, n_cycles, last_retire_cycle;
  bit  running;
  real atpi [NPTS];
  int  cyc_of [NPTS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (running && dmem_we[cur]) begin
      automatic int idx;
      idx = int'((dmem_addr[cur] - DBASE) >> 2) % DMEM_WORDS;
      for (int i = 0; i < 4; i++) if (dmem_be[cur][i]) dmem[idx][8*i +: 8] <= dmem_wdata[cur][8*i +: 8];
      if (exp_saddr.size() == 0) check(0, "unexpected store");
      else begin
        logic [31:0] ea, ed; logic [3:0] eb;
        ea = exp_saddr.pop_front(); ed = exp_sdata.pop_front(); eb = exp_sbe.pop_front();
        check(dmem_addr[cur][31:2] == ea[31:2] && dmem_be[cur] == eb, $sformatf("point %0d store address", cur));
        for (int i = 0; i < 4; i++)
          if (eb[i]) check(dmem_wdata[cur][8*i +: 8] == ed[8*i +: 8], $sformatf("point %0d store data", cur));
      end
    end
    if (running && wb_we[cur]) begin
      if (exp_rd.size() == 0) check(0, "unexpected register write");
      else begin
        logic [4:0] er; logic [31:0] ev, epc;
        er = exp_rd.pop_front(); ev = exp_val.pop_front(); epc = exp_pc.pop_front();
        check(wb_rd[cur] == er && wb_data[cur] == ev,
              $sformatf("point %0d write r%0d=%h exp r%0d=%h (pc %h)", cur, wb_rd[cur], wb_data[cur], er, ev, epc));
      end
    end
    if (running) begin
      n_cycles++;
      if (ev_retire[cur]) begin
        n_retired++;
        if (n_retired == int'(n_exec)) last_retire_cycle = n_cycles;
      end
    end
  end

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_point(int k, string mix);
    cur = k;
    run_iss(LIN[k], CYC[k], 10);
    for (int i = 0; i < DMEM_WORDS; i++) dmem[i] = dinit[i];
    for (int j = 0; j < NPTS; j++) rst_n[j] = 1'b0;
    running = 1'b0;
    n_retired = 0; n_cycles = 0; last_retire_cycle = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n[k] = 1'b1; running = 1'b1;
    while (n_retired < int'(n_exec) + 8 && n_cycles < 50000) @(posedge clk);
    @(negedge clk) running = 1'b0;
    check(exp_rd.size() == 0 && exp_saddr.size() == 0, $sformatf("point %0d: writes or stores missing", k));
    for (int i = 0; i < DMEM_WORDS; i++) check(dmem[i] == idmem[i], $sformatf("point %0d dmem[%0d]", k, i));
    check(last_retire_cycle == predicted_cycles(),
          $sformatf("point %0d: cycles %0d, predicted %0d", k, last_retire_cycle, predicted_cycles()));
    cyc_of[k] = last_retire_cycle;
    atpi[k] = real'(last_retire_cycle - 4) * real'(CYC[k]) / real'(n_exec);
    $display("%s mix, point %0d (%0d ns): %0d instr, %0d shifts, CPI %0.3f, time per instruction %0.1f ns",
             mix, k, CYC[k], n_exec, n_shift, real'(last_retire_cycle - 4) / real'(n_exec), atpi[k]);
  endtask

  initial begin
    for (int j = 0; j < NPTS; j++) rst_n[j] = 1'b0;
    running = 1'b0;
    cur = 0;
    for (int m = 0; m < 3; m++) begin
      string mix;
      if (m == 0) begin
        mix = "general";
        gen_program(NRANDOM, 5, 16, 26, 11);
      end else if (m == 1) begin
        mix = "network";
        gen_program(NRANDOM, 0, 38, 24, 13);
      end else begin
        mix = "worst-case shift";
        gen_program(NRANDOM, 5, 16, 26, 11, 31, 31);
      end
      for (int k = 0; k < NPTS; k++) run_point(k, mix);
      check(atpi[1] < atpi[2] && atpi[2] < atpi[0],
            $sformatf("%s mix: time per instruction order %0.1f/%0.1f/%0.1f", mix, atpi[0], atpi[1], atpi[2]));
      if (m == 2) begin
        // every shift is by 31: 9 extra cycles each at 33 ns, 4 at 66 ns
        check(cyc_of[1] - cyc_of[0] == 9 * int'(n_shift),
              $sformatf("33 ns point: %0d extra cycles for %0d shifts", cyc_of[1] - cyc_of[0], n_shift));
        check(cyc_of[2] - cyc_of[0] == 4 * int'(n_shift),
              $sformatf("66 ns point: %0d extra cycles for %0d shifts", cyc_of[2] - cyc_of[0], n_shift));
        $display("worst-case shift mix: shift fraction %0.3f, CPI %0.3f + %0.3f x 9 = %0.3f and + %0.3f x 4 = %0.3f",
                 real'(n_shift) / real'(n_exec), real'(cyc_of[0] - 4) / real'(n_exec),
                 real'(n_shift) / real'(n_exec), real'(cyc_of[1] - 4) / real'(n_exec),
                 real'(n_shift) / real'(n_exec), real'(cyc_of[2] - 4) / real'(n_exec));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
