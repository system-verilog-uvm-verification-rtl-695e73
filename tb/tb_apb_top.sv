// tb_apb_top: end-to-end test of the APB subsystem at its default size (bridge, read
// multiplexer, three 256 x 32-bit memory slaves).
//
// A system-bus requester first writes AAAAEEEEh, FFFFEEEEh, FFFF1111h and 00001111h to
// words 00h, ABh, 10h and 30h of slave 1 and reads them back, then reads three words never
// written (expected zero), then issues random reads and writes to all three slaves and to
// the unmapped index 3. A reference copy of the three memories gives every expected read
// value. Checked for every transfer: read data, error flag, and the latency of three
// cycles from acceptance to response (SETUP, ACCESS, response). A burst of back-to-back
// requests checks the rate of one transfer per two cycles. The shared APB signals are
// watched to count each mechanism: write, read, SETUP->ACCESS, ACCESS->SETUP (back to
// back), ACCESS->IDLE, idle cycles, each PSEL, unmapped access and reads of unwritten
// words; one that never occurs counts as a failure. Inputs change and outputs are sampled
// at the falling edge.
module tb_apb_top;
  localparam int unsigned AW   = apb_pkg::APB_ADDR_W;
  localparam int unsigned DW   = apb_pkg::APB_DATA_W;
  localparam int unsigned N    = apb_pkg::APB_NSLV;
  localparam int unsigned SELW = 2;
  localparam int unsigned SYSW = SELW + AW;

  logic            pclk = 1'b0;
  logic            presetn;
  logic            sys_req_valid, sys_req_ready, sys_req_write;
  logic [SYSW-1:0] sys_req_addr;
  logic [DW-1:0]   sys_req_wdata;
  logic            sys_rsp_valid, sys_rsp_err;
  logic [DW-1:0]   sys_rsp_rdata;
  logic [N-1:0]    mon_psel;
  logic            mon_penable, mon_pwrite, mon_pready;
  logic [AW-1:0]   mon_paddr;
  logic [DW-1:0]   mon_pwdata, mon_prdata;

  apb_top dut (.*);

  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  typedef struct {
    bit            wr;
    logic [SYSW-1:0] a;
    logic [DW-1:0] d;
  } req_t;
  typedef struct {
    longint        cyc;
    logic [DW-1:0] d;
    bit            err;
  } exp_t;

  logic [DW-1:0] ref_mem [N][1<<AW];
  bit            ref_written [N][1<<AW];
  req_t          script[$];
  exp_t          expq[$];

  // mechanism counters
  int n_wr = 0, n_rd = 0, n_setup_access = 0, n_b2b = 0, n_to_idle = 0, n_idle = 0;
  int n_unmapped = 0, n_unwritten = 0;
  int n_sel [N] = '{default: 0};

  longint cyc = 0;
  bit     taken = 1'b0;
  bit     random_on = 1'b0;
  bit     burst = 1'b0;
  int     n_random = 0;
  logic [N-1:0] prev_psel = '0;
  logic         prev_pen = 1'b0;
  longint       last_accept = -1;
  int           burst_ok = 0, burst_seen = 0;

  localparam int unsigned NRANDOM = 20000;

  function automatic req_t mk(bit wr, int idx, logic [AW-1:0] a, logic [DW-1:0] d);
    req_t r;
    r.wr = wr; r.a = {SELW'(idx), a}; r.d = d;
    return r;
  endfunction

  localparam logic [AW-1:0] PA [4] = '{8'h00, 8'hAB, 8'h10, 8'h30};
  localparam logic [DW-1:0] PD [4] = '{32'hAAAAEEEE, 32'hFFFFEEEE, 32'hFFFF1111, 32'h00001111};

  initial begin
    for (int s = 0; s < N; s++)
      for (int i = 0; i < (1 << AW); i++) begin
        ref_mem[s][i] = '0;
        ref_written[s][i] = 1'b0;
      end
    for (int i = 0; i < 4; i++) script.push_back(mk(1'b1, 0, PA[i], PD[i]));
    for (int i = 0; i < 4; i++) script.push_back(mk(1'b0, 0, PA[i], '0));
    script.push_back(mk(1'b0, 0, 8'hDC, '0));
    script.push_back(mk(1'b0, 1, 8'hA2, '0));
    script.push_back(mk(1'b0, 2, 8'h38, '0));
    // burst of back-to-back requests: rate check
    for (int i = 0; i < 16; i++) script.push_back(mk(1'($urandom_range(0, 1)), i % N, AW'($urandom), $urandom));

    presetn = 1'b0; sys_req_valid = 0; sys_req_write = 0; sys_req_addr = 0; sys_req_wdata = 0;
    repeat (3) @(negedge pclk);
    presetn = 1'b1;
    while (n_random < NRANDOM || expq.size() != 0 || script.size() != 0 || sys_req_valid) begin
      @(negedge pclk);
      cyc++;
      // responses
      if (sys_rsp_valid) begin
        if (expq.size() == 0) check(1'b0, "response with none outstanding");
        else begin
          exp_t e;
          e = expq.pop_front();
          check(sys_rsp_rdata == e.d && sys_rsp_err == e.err,
                $sformatf("response %08h err=%b exp %08h err=%b", sys_rsp_rdata, sys_rsp_err,
                          e.d, e.err));
          check(cyc - e.cyc == 3, $sformatf("latency %0d cycles", cyc - e.cyc));
        end
      end
      // bus monitor
      if (mon_psel == '0) n_idle++;
      for (int i = 0; i < N; i++) if (mon_psel[i] && !mon_penable) n_sel[i]++;
      if (mon_penable && mon_pready) begin
        if (mon_pwrite) n_wr++; else n_rd++;
      end
      if (prev_psel != '0 && !prev_pen && mon_penable) n_setup_access++;
      if (prev_pen && mon_psel != '0 && !mon_penable) n_b2b++;
      if (prev_pen && mon_psel == '0) n_to_idle++;
      prev_psel = mon_psel;
      prev_pen  = mon_penable;
      // requester
      if (taken) sys_req_valid = 1'b0;
      taken = 1'b0;
      if (!sys_req_valid) begin
        req_t r;
        bit   go;
        go = 1'b0;
        if (script.size() != 0) begin
          r = script.pop_front();
          go = 1'b1;
          burst = (script.size() < 16);
        end else if (n_random < NRANDOM) begin
          burst = 1'b0;
          if ($urandom_range(0, 3) != 0) begin
            r.wr = 1'($urandom_range(0, 1));
            // mostly a small address window so reads hit written words
            r.a  = {SELW'($urandom_range(0, 3)),
                    ($urandom_range(0, 1) != 0) ? AW'($urandom_range(0, 15)) : AW'($urandom)};
            r.d  = $urandom;
            go = 1'b1;
            n_random++;
          end
        end
        if (go) begin
          sys_req_valid = 1'b1;
          sys_req_write = r.wr;
          sys_req_addr  = r.a;
          sys_req_wdata = r.d;
        end
      end
      #1;
      if (sys_req_valid && sys_req_ready) begin
        exp_t e;
        int idx;
        logic [AW-1:0] a;
        idx = int'(sys_req_addr[SYSW-1 -: SELW]);
        a   = sys_req_addr[AW-1:0];
        e.cyc = cyc;
        e.err = (idx >= N);
        e.d   = '0;
        if (idx >= N) n_unmapped++;
        else if (sys_req_write) begin
          ref_mem[idx][a] = sys_req_wdata;
          ref_written[idx][a] = 1'b1;
        end else begin
          e.d = ref_mem[idx][a];
          if (!ref_written[idx][a]) n_unwritten++;
        end
        expq.push_back(e);
        if (burst) begin
          if (last_accept >= 0) begin
            burst_seen++;
            if (cyc - last_accept == 2) burst_ok++;
          end
          last_accept = cyc;
        end
        taken = 1'b1;
      end
    end
    $display("writes=%0d reads=%0d setup->access=%0d back_to_back=%0d access->idle=%0d idle=%0d",
             n_wr, n_rd, n_setup_access, n_b2b, n_to_idle, n_idle);
    $display("unmapped=%0d unwritten_reads=%0d psel1=%0d psel2=%0d psel3=%0d burst=%0d/%0d",
             n_unmapped, n_unwritten, n_sel[0], n_sel[1], n_sel[2], burst_ok, burst_seen);
    check(burst_seen == 15 && burst_ok == 15, "back-to-back rate of one transfer per 2 cycles");
    check(n_wr > 0, "write occurred");
    check(n_rd > 0, "read occurred");
    check(n_setup_access > 0, "SETUP->ACCESS occurred");
    check(n_b2b > 0, "ACCESS->SETUP occurred");
    check(n_to_idle > 0, "ACCESS->IDLE occurred");
    check(n_idle > 0, "idle bus occurred");
    check(n_unmapped > 0, "unmapped access occurred");
    check(n_unwritten > 0, "read of unwritten word occurred");
    for (int i = 0; i < N; i++) check(n_sel[i] > 0, $sformatf("PSEL%0d occurred", i + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge pclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
