// tb_ahb_bus: end-to-end test of the shared AHB bus with its reconfigurable
// arbiter, at the default configuration (four masters, four slaves, 32-bit
// address and data).
//
// Masters and slaves are modelled here. Each master holds at most one
// pending transfer (a random read or write to a random word of a random
// slave), requests the bus while it has one, presents its address and
// control while requesting, and drives the write data in the cycle after it
// was granted. Each slave is a 16-word memory that captures the address
// phase on the rising edge, stores write data at the end of the data phase
// and drives read data during the data phase (random data otherwise, so a
// wrong read data select is caught).
//
// Every cycle the testbench checks, against its own models:
//   - the grant, from an independent model of the selected scheme and of
//     the token (master 1 after reset, one step per clock);
//   - the address, control and slave select of the address phase;
//   - the write data and the read data of the data phase (a scoreboard
//     memory is updated in transfer order).
// Phases: each scheme alone, then random switching among all four codes,
// then the masters-2-and-4 latency example for each scheme (round robin
// grants master 4 in cycle 4, modified round robin in cycle 2, fixed
// priority only after master 2 stops requesting). Each mechanism (grants
// by each scheme, contention, token passed with no grant, modified round
// robin grant ahead of the token, fixed priority holding off a requester,
// run-time switch, reads, writes, every slave) is counted and must occur.
module tb_ahb_bus;
  import ahb_arb_pkg::*;

  localparam int NM = 4;
  localparam int NS = 4;

  typedef struct packed {
    logic [31:0] addr;
    logic        write;
    logic [31:0] data;
  } xfer_t;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [1:0]  arbitration;
  logic [NM-1:0] hbusreq, hgrant, token;
  logic [31:0] haddr_m  [NM];
  ahb_ctrl_t   hctrl_m  [NM];
  logic [31:0] hwdata_m [NM];
  logic [31:0] hrdata;
  logic [31:0] haddr;
  ahb_ctrl_t   hctrl;
  logic [NS-1:0] hsel;
  logic [31:0] hwdata;
  logic [31:0] hrdata_s [NS];

  ahb_bus dut (
    .clk(clk), .rst_n(rst_n), .arbitration(arbitration),
    .hbusreq(hbusreq), .hgrant(hgrant), .token(token),
    .haddr_m(haddr_m), .hctrl_m(hctrl_m), .hwdata_m(hwdata_m), .hrdata(hrdata),
    .haddr(haddr), .hctrl(hctrl), .hsel(hsel), .hwdata(hwdata), .hrdata_s(hrdata_s)
  );

  always #5 clk = ~clk;

  // ---------------- slave models ----------------
  logic [31:0] smem [NS][16];
  logic        s_dp [NS];
  logic        s_wr [NS];
  logic [3:0]  s_ad [NS];
  logic [31:0] s_noise [NS];

  always_ff @(posedge clk) begin
    for (int s = 0; s < NS; s++) begin
      if (s_dp[s] && s_wr[s]) smem[s][s_ad[s]] <= hwdata;
      s_dp[s]    <= rst_n && hsel[s];
      s_wr[s]    <= hctrl.hwrite;
      s_ad[s]    <= haddr[5:2];
      s_noise[s] <= $urandom;
    end
  end

  always_comb begin
    for (int s = 0; s < NS; s++)
      hrdata_s[s] = (s_dp[s] && !s_wr[s]) ? smem[s][s_ad[s]] : s_noise[s];
  end

  // ---------------- master models and scoreboard ----------------
  logic        pend [NM];
  xfer_t       cur  [NM];
  logic [31:0] ref_mem [NS][16];
  logic        auto_gen;  // masters create new transfers by themselves
  int          tok;
  logic        dp_valid;
  int          dp_master;
  xfer_t       dp_x;
  logic [31:0] dp_rexp;

  // mechanism counters
  int n_grant [4];
  int n_contention, n_token_pass, n_mrr_ahead, n_fixed_hold, n_switch;
  int n_reads, n_writes;
  int n_slave [NS];

  function automatic xfer_t new_xfer();
    xfer_t x;
    x.addr  = {2'($urandom), 24'd0, 4'($urandom), 2'b00};
    x.write = 1'($urandom);
    x.data  = $urandom;
    return x;
  endfunction

  function automatic logic [NM-1:0] ref_grant(logic [1:0] a, logic [NM-1:0] r, int t);
    logic [NM-1:0] g;
    g = '0;
    case (a)
      2'b01: if (r[t]) g[t] = 1'b1;
      2'b10: for (int k = 0; k < NM; k++) if (g == '0 && r[(t + k) % NM]) g[(t + k) % NM] = 1'b1;
      default: for (int i = NM - 1; i >= 0; i--) if (r[i]) g = NM'(1) << i;
    endcase
    return g;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    for (int m = 0; m < NM; m++) pend[m] = 1'b0;
    dp_valid = 1'b0;
    hbusreq  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    tok   = 0;
  endtask

  // One bus cycle: drive the masters, check everything, advance the models.
  task automatic cycle(output logic [NM-1:0] granted);
    logic [NM-1:0] exp_g;
    int g;
    // master outputs
    for (int m = 0; m < NM; m++) begin
      hbusreq[m]  = pend[m];
      haddr_m[m]  = pend[m] ? cur[m].addr : $urandom;
      hctrl_m[m]  = pend[m] ? '{htrans: HTRANS_NONSEQ, hwrite: cur[m].write, hsize: 3'd2}
                            : '{htrans: HTRANS_IDLE, hwrite: 1'($urandom), hsize: 3'd2};
      hwdata_m[m] = (dp_valid && dp_master == m) ? dp_x.data : $urandom;
    end
    #1;
    // data phase of the previous transfer
    if (dp_valid) begin
      checks++;
      if (dp_x.write && hwdata !== dp_x.data)
        fail($sformatf("hwdata %h exp %h", hwdata, dp_x.data));
      if (!dp_x.write && hrdata !== dp_rexp)
        fail($sformatf("hrdata %h exp %h", hrdata, dp_rexp));
    end
    // arbitration
    exp_g = ref_grant(arbitration, hbusreq, tok);
    checks++;
    if (hgrant !== exp_g || token !== NM'(1) << tok)
      fail($sformatf("arb=%b req=%b grant=%b exp=%b token=%b tok=%0d",
                     arbitration, hbusreq, hgrant, exp_g, token, tok));
    if ($countones(hbusreq) > 1) n_contention++;
    if (hbusreq != 0 && arbitration == 2'b01 && !hbusreq[tok]) n_token_pass++;
    if (arbitration == 2'b10 && exp_g != 0 && !exp_g[tok]) n_mrr_ahead++;
    if ((arbitration == 2'b00 || arbitration == 2'b11) && (hbusreq & ~exp_g) != 0) n_fixed_hold++;
    granted  = hgrant;
    dp_valid = 1'b0;
    g = -1;
    for (int m = 0; m < NM; m++) if (exp_g[m]) g = m;
    if (g >= 0) begin
      // address phase on the bus
      checks++;
      if (haddr !== cur[g].addr || hctrl.htrans !== HTRANS_NONSEQ || hctrl.hwrite !== cur[g].write
          || hsel !== NS'(1) << cur[g].addr[31:30])
        fail($sformatf("address phase haddr=%h hctrl=%h hsel=%b", haddr, hctrl, hsel));
      n_grant[arbitration]++;
      n_slave[cur[g].addr[31:30]]++;
      dp_valid  = 1'b1;
      dp_master = g;
      dp_x      = cur[g];
      if (cur[g].write) begin
        n_writes++;
        ref_mem[cur[g].addr[31:30]][cur[g].addr[5:2]] = cur[g].data;
      end else begin
        n_reads++;
        dp_rexp = ref_mem[cur[g].addr[31:30]][cur[g].addr[5:2]];
      end
      pend[g] = 1'b0;
    end else begin
      checks++;
      if (hsel !== '0 || hctrl.htrans !== HTRANS_IDLE) fail($sformatf("bus not idle, hsel=%b", hsel));
    end
    if (auto_gen) begin
      for (int m = 0; m < NM; m++) begin
        if (!pend[m] && ($urandom % 3) == 0) begin
          pend[m] = 1'b1;
          cur[m]  = new_xfer();
        end
      end
    end
    @(negedge clk);
    tok = (tok + 1) % NM;
  endtask

  // Masters 2 and 4 (bits 1 and 3) request from cycle 1; master 2 has
  // m2_count transfers in a row. Returns the cycle master 4 is granted.
  task automatic latency(logic [1:0] a, int m2_count, output int when);
    logic [NM-1:0] gr;
    int left;
    auto_gen    = 1'b0;
    arbitration = a;
    do_reset();
    left = m2_count;
    pend[1] = 1'b1; cur[1] = new_xfer();
    pend[3] = 1'b1; cur[3] = new_xfer();
    when = -1;
    for (int c = 1; c <= 20 && when < 0; c++) begin
      cycle(gr);
      if (gr[3]) when = c;
      if (gr[1] && --left > 0) begin
        pend[1] = 1'b1;
        cur[1]  = new_xfer();
      end
    end
    cycle(gr);  // finish the data phase
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NM-1:0] gr;
    int when;
    logic [1:0] last;

    for (int s = 0; s < NS; s++) begin
      for (int w = 0; w < 16; w++) begin
        smem[s][w]    = 32'(s * 16 + w);
        ref_mem[s][w] = 32'(s * 16 + w);
      end
      s_dp[s] = 1'b0;
    end
    arbitration = 2'b00;
    auto_gen    = 1'b1;
    do_reset();

    // Each scheme on its own.
    for (int a = 0; a < 3; a++) begin
      arbitration = 2'(a);
      repeat (300) cycle(gr);
    end
    // Run-time switching among all four codes.
    last = arbitration;
    for (int c = 0; c < 400; c++) begin
      if (($urandom % 8) == 0) arbitration = 2'($urandom);
      if (arbitration != last) n_switch++;
      last = arbitration;
      cycle(gr);
    end

    // Latency example: masters 2 and 4 request in the same cycle.
    latency(2'b01, 1, when);
    checks++;
    if (when != 4) fail($sformatf("round robin: master 4 granted in cycle %0d, expected 4", when));
    latency(2'b10, 1, when);
    checks++;
    if (when != 2) fail($sformatf("modified round robin: master 4 granted in cycle %0d, expected 2", when));
    latency(2'b00, 3, when);
    checks++;
    if (when != 4) fail($sformatf("fixed priority: master 4 granted in cycle %0d, expected 4", when));

    $display("grants fixed=%0d rr=%0d mrr=%0d code11=%0d", n_grant[0], n_grant[1], n_grant[2], n_grant[3]);
    $display("contention=%0d token_pass=%0d mrr_ahead=%0d fixed_hold=%0d switches=%0d",
             n_contention, n_token_pass, n_mrr_ahead, n_fixed_hold, n_switch);
    $display("reads=%0d writes=%0d slaves=%0d/%0d/%0d/%0d", n_reads, n_writes,
             n_slave[0], n_slave[1], n_slave[2], n_slave[3]);
    checks++; if (n_grant[0] == 0)   fail("no fixed priority grant");
    checks++; if (n_grant[1] == 0)   fail("no round robin grant");
    checks++; if (n_grant[2] == 0)   fail("no modified round robin grant");
    checks++; if (n_grant[3] == 0)   fail("unassigned code never granted");
    checks++; if (n_contention == 0) fail("no contention");
    checks++; if (n_token_pass == 0) fail("token never passed without a grant");
    checks++; if (n_mrr_ahead == 0)  fail("modified round robin never granted ahead of the token");
    checks++; if (n_fixed_hold == 0) fail("fixed priority never held off a requester");
    checks++; if (n_switch == 0)     fail("scheme never switched");
    checks++; if (n_reads == 0)      fail("no read");
    checks++; if (n_writes == 0)     fail("no write");
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (n_slave[s] == 0) fail($sformatf("slave %0d never addressed", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
