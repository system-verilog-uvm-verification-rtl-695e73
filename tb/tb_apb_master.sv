// tb_apb_master: self-checking test of the APB bridge.
//
// The bench plays both neighbours of the bridge: a system-bus requester issuing random
// reads and writes (to slaves 1..3 and to the unmapped index 3), sometimes back to back
// and sometimes with idle gaps, and an APB slave that inserts 0..3 wait states (PREADY
// low) and returns a read value computed from the slave index and address. While PREADY
// is low it drives a wrong value on PRDATA, so a bridge that samples early is caught.
//
// The expected behaviour is tracked cycle by cycle from the accepted requests:
//   accept at cycle c -> SETUP at c+1 (one-hot PSEL of the index, PENABLE low, PADDR,
//   PWRITE, PWDATA of the request), ACCESS from c+2 for 1 + waits cycles, response at the
//   cycle after the last ACCESS cycle, with read data or zero and rsp_err for index 3.
// sys_req_ready must be high exactly when the bus is idle or the ACCESS cycle completes.
// Inputs change and outputs are sampled at the falling edge. Every mechanism (wait state,
// back-to-back transfer, idle gap, unmapped access, read, write, each PSEL) must occur.
module tb_apb_master;
  localparam int unsigned AW   = 8;
  localparam int unsigned DW   = 32;
  localparam int unsigned N    = 3;
  localparam int unsigned SELW = 2;
  localparam int unsigned SYSW = SELW + AW;

  logic            pclk = 1'b0;
  logic            presetn;
  logic            sys_req_valid, sys_req_ready, sys_req_write;
  logic [SYSW-1:0] sys_req_addr;
  logic [DW-1:0]   sys_req_wdata;
  logic            sys_rsp_valid, sys_rsp_err;
  logic [DW-1:0]   sys_rsp_rdata;
  logic [N-1:0]    psel;
  logic            penable, pwrite, pready;
  logic [AW-1:0]   paddr;
  logic [DW-1:0]   pwdata, prdata;

  apb_master #(.ADDR_W(AW), .DATA_W(DW), .NSLV(N)) dut (.*);

  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  int n_wait = 0, n_b2b = 0, n_gap = 0, n_unmapped = 0, n_rd = 0, n_wr = 0;
  int n_sel [N] = '{default: 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [DW-1:0] slave_data(input int idx, input logic [AW-1:0] a);
    return (32'h9E3779B9 * (32'(a) + 1)) ^ (32'(idx) << 28);
  endfunction

  typedef enum int {PH_NONE, PH_SETUP, PH_ACCESS} phase_e;
  typedef struct {
    bit            wr;
    int            idx;
    logic [AW-1:0] a;
    logic [DW-1:0] d;
  } req_t;

  req_t          cur;
  phase_e        phase = PH_NONE;
  int            waits_left = 0;
  bit            rsp_due = 0;
  logic [DW-1:0] rsp_data;
  bit            rsp_err_exp;
  int            n_done = 0;
  bit            completing;
  bit            exp_ready;
  bit            taken = 1'b0;

  localparam int unsigned NXFER = 3000;

  initial begin
    presetn = 1'b0; sys_req_valid = 0; sys_req_write = 0; sys_req_addr = 0;
    sys_req_wdata = 0; pready = 0; prdata = 0;
    repeat (3) @(negedge pclk);
    presetn = 1'b1;
    while (n_done < NXFER) begin
      @(negedge pclk);
      // 1. registered outputs against the expectation for this cycle
      if (phase == PH_NONE) begin
        check(psel == '0 && !penable, "bus idle");
      end else begin
        logic [N-1:0] es;
        es = (cur.idx < N) ? N'(1 << cur.idx) : '0;
        check(psel == es, $sformatf("PSEL %b exp %b", psel, es));
        check(penable == ((phase == PH_ACCESS) && cur.idx < N), "PENABLE");
        check(paddr == cur.a && pwrite == cur.wr && (!cur.wr || pwdata == cur.d),
              "PADDR/PWRITE/PWDATA");
      end
      if (rsp_due) begin
        check(sys_rsp_valid && sys_rsp_rdata == rsp_data && sys_rsp_err == rsp_err_exp,
              $sformatf("response v=%b d=%08h exp %08h err=%b", sys_rsp_valid,
                        sys_rsp_rdata, rsp_data, sys_rsp_err));
        n_done++;
      end else begin
        check(!sys_rsp_valid, "no spurious response");
      end
      // 2. drive the slave side and the requester
      completing = (phase == PH_ACCESS) && (waits_left == 0 || cur.idx >= N);
      pready = (phase == PH_ACCESS) && (waits_left == 0);
      if (phase == PH_ACCESS && cur.idx < N)
        prdata = pready ? slave_data(cur.idx, cur.a) : ~slave_data(cur.idx, cur.a);
      else
        prdata = $urandom;
      if (taken) sys_req_valid = 1'b0;
      taken = 1'b0;
      if (!sys_req_valid) begin
        if ($urandom_range(0, 2) != 0) begin
          sys_req_valid = 1'b1;
          sys_req_write = 1'($urandom_range(0, 1));
          sys_req_addr  = {SELW'($urandom_range(0, 3)), AW'($urandom)};
          sys_req_wdata = $urandom;
        end else if (phase == PH_NONE) n_gap++;
      end
      // 3. handshake
      #1;
      exp_ready = (phase == PH_NONE) || completing;
      check(sys_req_ready == exp_ready, "sys_req_ready");
      // 4. advance the model
      rsp_due = 1'b0;
      if (completing) begin
        rsp_due     = 1'b1;
        rsp_err_exp = (cur.idx >= N);
        rsp_data    = (!cur.wr && cur.idx < N) ? slave_data(cur.idx, cur.a) : '0;
        phase       = PH_NONE;
      end else if (phase == PH_SETUP) begin
        phase      = PH_ACCESS;
        waits_left = (cur.idx < N) ? $urandom_range(0, 3) : 0;
        if (waits_left > 0) n_wait++;
      end else if (phase == PH_ACCESS) begin
        waits_left--;
      end
      if (sys_req_valid && sys_req_ready) begin
        if (completing) n_b2b++;
        cur.wr  = sys_req_write;
        cur.idx = int'(sys_req_addr[SYSW-1 -: SELW]);
        cur.a   = sys_req_addr[AW-1:0];
        cur.d   = sys_req_wdata;
        if (cur.idx >= N) n_unmapped++;
        else n_sel[cur.idx]++;
        if (cur.wr) n_wr++; else n_rd++;
        phase = PH_SETUP;
        taken = 1'b1;  // valid drops after the clock edge that takes it
      end
    end
    $display("waits=%0d back_to_back=%0d gaps=%0d unmapped=%0d reads=%0d writes=%0d",
             n_wait, n_b2b, n_gap, n_unmapped, n_rd, n_wr);
    check(n_wait > 0, "wait states exercised");
    check(n_b2b > 0, "back-to-back transfers exercised");
    check(n_gap > 0, "idle gaps exercised");
    check(n_unmapped > 0, "unmapped index exercised");
    check(n_rd > 0 && n_wr > 0, "reads and writes exercised");
    for (int i = 0; i < N; i++) check(n_sel[i] > 0, $sformatf("PSEL%0d exercised", i + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge pclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
