// tb_dlx_top: end-to-end test of the DLX datapath at its default
// configuration (parallel prefix adder, linear shifter, 33 ns cycle).
//
// A generated program (fixed prologue plus random instructions) runs on the
// pipeline against single-cycle instruction and data memories. Every
// register write-back and every store is compared, in order, with the
// instruction-level reference model of tb_dlx_pkg; the final data memory is
// compared word by word, and the number of cycles until the last instruction
// retires must equal the count predicted from the branch, load-interlock and
// shift-length rules. Each pipeline mechanism (shift stall, branch stall,
// load interlock, both bypass paths, taken and untaken branches) must occur
// at least once. Several programs with different seeds are run, each after
// a reset.
module tb_dlx_top;
  import tb_dlx_pkg::*;

  localparam int NPROG   = 4;
  localparam int NRANDOM = 400;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, wb_data;
  logic [3:0]  dmem_be;
  logic        dmem_we, dmem_re, wb_we;
  logic [4:0]  wb_rd;
  logic        ev_retire, ev_shift_stall, ev_load_stall, ev_branch_stall;
  logic        ev_bypass_result, ev_bypass_mdr, ev_overflow, ev_illegal, shift_busy;

  logic [31:0] dmem [DMEM_WORDS];

  dlx_top dut (.*);

  always #5 clk = ~clk;

  assign imem_rdata = prog[imem_addr[12:2]];
  assign dmem_rdata = dmem[(dmem_addr - DBASE) >> 2 & (DMEM_WORDS - 1)];

  int checks = 0, failures = 0;
  int n_retired, n_cycles, last_retire_cycle;
  int c_shift, c_load, c_branch, c_byp_res, c_byp_mdr, c_illegal;
  int t_shift, t_load, t_branch, t_byp_res, t_byp_mdr, t_taken, t_untaken, t_long;
  bit running;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // memory write and trace comparison
  always @(posedge clk) begin
    if (rst_n && dmem_we) begin
      automatic int idx;
      idx = int'((dmem_addr - DBASE) >> 2) % DMEM_WORDS;
      for (int i = 0; i < 4; i++) if (dmem_be[i]) dmem[idx][8*i +: 8] <= dmem_wdata[8*i +: 8];
      if (exp_saddr.size() == 0) check(0, "unexpected store");
      else begin
        logic [31:0] ea, ed; logic [3:0] eb;
        ea = exp_saddr.pop_front(); ed = exp_sdata.pop_front(); eb = exp_sbe.pop_front();
        check(dmem_addr[31:2] == ea[31:2] && dmem_be == eb, $sformatf("store addr %h/%b exp %h/%b", dmem_addr, dmem_be, ea, eb));
        for (int i = 0; i < 4; i++)
          if (eb[i]) check(dmem_wdata[8*i +: 8] == ed[8*i +: 8], $sformatf("store data %h exp %h", dmem_wdata, ed));
      end
    end
    if (rst_n && wb_we) begin
      if (exp_rd.size() == 0) check(0, "unexpected register write");
      else begin
        logic [4:0] er; logic [31:0] ev;
        logic [31:0] epc;
        er = exp_rd.pop_front(); ev = exp_val.pop_front(); epc = exp_pc.pop_front();
        check(wb_rd == er && wb_data == ev, $sformatf("write r%0d=%h exp r%0d=%h (pc %h: %h)", wb_rd, wb_data, er, ev, epc, prog[epc[12:2]]));
      end
    end
    if (rst_n && running) begin
      n_cycles++;
      if (ev_retire) begin n_retired++; if (n_retired == int'(n_exec)) last_retire_cycle = n_cycles; end
      c_shift   += int'(ev_shift_stall);
      c_load    += int'(ev_load_stall);
      c_branch  += int'(ev_branch_stall);
      c_byp_res += int'(ev_bypass_result);
      c_byp_mdr += int'(ev_bypass_mdr);
      c_illegal += int'(ev_illegal);
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPROG; p++) begin
      gen_program(NRANDOM, 10, 12, 12, 8);
      run_iss(1'b1, 33, 10);
      for (int i = 0; i < DMEM_WORDS; i++) dmem[i] = dinit[i];
      rst_n = 1'b0;
      running = 1'b0;
      n_retired = 0; n_cycles = 0; last_retire_cycle = 0;
      c_shift = 0; c_load = 0; c_branch = 0; c_byp_res = 0; c_byp_mdr = 0; c_illegal = 0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1'b1; running = 1'b1;
      while (n_retired < int'(n_exec) + 8 && n_cycles < 50000) @(posedge clk);
      @(negedge clk) running = 1'b0;
      check(exp_rd.size() == 0, $sformatf("%0d register writes missing", exp_rd.size()));
      check(exp_saddr.size() == 0, $sformatf("%0d stores missing", exp_saddr.size()));
      for (int i = 0; i < DMEM_WORDS; i++) check(dmem[i] == idmem[i], $sformatf("dmem[%0d]", i));
      check(last_retire_cycle == predicted_cycles(),
            $sformatf("cycles %0d, predicted %0d", last_retire_cycle, predicted_cycles()));
      check(c_shift == int'(shift_extra), $sformatf("shift stall cycles %0d exp %0d", c_shift, shift_extra));
      check(c_load == int'(n_load_use), $sformatf("load stalls %0d exp %0d", c_load, n_load_use));
      check(c_illegal == 0, "illegal instruction seen");
      $display("program %0d: %0d instr, %0d cycles (CPI %0.3f), shifts %0d (long %0d, %0d stall cycles), ctrl %0d (taken %0d), load interlocks %0d, bypass result/mdr %0d/%0d",
               p, n_exec, last_retire_cycle, real'(last_retire_cycle - 4) / real'(n_exec),
               n_shift, n_long_shift, c_shift, n_ctrl, n_taken, c_load, c_byp_res, c_byp_mdr);
      t_shift += c_shift; t_load += c_load; t_branch += c_branch;
      t_byp_res += c_byp_res; t_byp_mdr += c_byp_mdr; t_long += int'(n_long_shift);
      t_taken += int'(n_taken); t_untaken += int'(n_ctrl - n_taken);
    end
    check(t_shift   > 0, "no shift stall happened");
    check(t_long    > 0, "no multi-cycle shift happened");
    check(t_load    > 0, "no load interlock happened");
    check(t_branch  > 0, "no branch stall happened");
    check(t_byp_res > 0, "no bypass from the result register happened");
    check(t_byp_mdr > 0, "no bypass from the memory data register happened");
    check(t_taken   > 0, "no taken branch happened");
    check(t_untaken > 0, "no untaken branch happened");
    $display("mechanisms: shift stall %0d, load interlock %0d, branch stall %0d, bypass result %0d, bypass mdr %0d, taken %0d, untaken %0d",
             t_shift, t_load, t_branch, t_byp_res, t_byp_mdr, t_taken, t_untaken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
