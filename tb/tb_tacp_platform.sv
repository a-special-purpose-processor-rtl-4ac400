// tb_tacp_platform: end-to-end test of the whole test system at its default
// parameters (50 MHz clock, 57600 baud UART), driven only through the host
// serial line, as host software would.
//
// The testbench plays the host: it sends protocol packets on rx and
// decodes bytes from tx. It downloads and runs six test programs and
// checks the results read back over the line:
//   A  the 4-bit adder test: ten random vectors applied, responses read,
//      compared with expected sums (58-byte program, loop on the user
//      counter with JNZ), then the test-result memory is uploaded;
//   B  the pipelined 8-bit adder: two apply-and-capture operations per
//      vector, 9-bit result read as two bytes;
//   C  user-counter store/load through the result memory, JCompareCorrect,
//      Call/Return on the stack, a break point and single stepping;
//   D  loop-back through an 18-bit application port, checking the bits that
//      come back into TD against a model of port and TD shifting;
//   E  selection-mask read-back: a selected bit pushed out of the chain
//      arrives in SM;
//   F  oscillator control word download and frequency measurement for two
//      control words, and an apply-and-capture at the oscillator clock;
//   G  scan chain: two bytes shifted through a five-flip-flop scan chain
//      model attached to the third circuit's scan port and read back;
//   H  both adder tests again with the published example vectors and
//      expected results (4 + 5 bits and 8 + 4 + 5 bits per vector).
// Each mechanism is counted; one that never happens counts as a failure.
// The UART frame length on tx (10 bits of 4 * 217 clocks) is checked.
module tb_tacp_platform;

  localparam int unsigned CD     = 217;
  localparam int unsigned BIT_CY = 4 * CD;

  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic        rx = 1'b1;
  logic        tx;
  logic [3:0]  status;
  logic        iut2_clk, iut2_scan_in, iut3_clk, iut3_scan_in;
  logic [17:0] iut2_in, iut3_in;
  logic        iut2_scan_en;
  logic [4:0]  chain2 = '0;      // scan chain of circuit 3: five flip-flops

  tacp_platform dut (
    .clk, .reset, .rx, .tx, .status,
    .iut2_clk, .iut2_in, .iut2_out(19'h0), .iut2_scan_in, .iut2_scan_en, .iut2_scan_out(chain2[4]),
    .iut3_clk, .iut3_in, .iut3_out(19'h0), .iut3_scan_in, .iut3_scan_en(), .iut3_scan_out(1'b0)
  );

  always #10ns clk = ~clk;
  always_ff @(posedge clk) if (iut2_scan_en) chain2 <= {chain2[3:0], iut2_scan_in};

  int checks = 0, failures = 0;

  // mechanism counters
  typedef enum int {
    M_RX_BYTE, M_TX_BYTE, M_INST_WRITE, M_TD_WRITE, M_REG_DUMP, M_RUN, M_STOP_INSTR,
    M_AAC, M_AAC_HF, M_JNZ_LOOP, M_COMPARE, M_CF_SET, M_JCOMPARE, M_CALL, M_RETURN,
    M_STORE_UC, M_LOAD_UC_MEM, M_BREAK, M_STEP, M_LOOPBACK, M_MASK_OUT, M_FREQ_MEAS,
    M_SEND_CW, M_PIPE_ADD, M_RESET_CMD, M_SCAN, M_EXAMPLE, M_NUM
  } mech_e;
  int mech [M_NUM];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- host serial line ----------------
  logic [7:0] rxq[$];
  bit         mon_on = 0;

  task automatic send_byte(input logic [7:0] b);
    rx = 1'b0;
    repeat (BIT_CY) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (BIT_CY) @(posedge clk);
    end
    rx = 1'b1;
    repeat (2 * BIT_CY) @(posedge clk);
    mech[M_RX_BYTE]++;
  endtask

  initial begin : tx_monitor
    logic [7:0] b;
    longint     t0;
    wait (mon_on);
    forever begin
      @(negedge tx);
      t0 = $time;
      repeat (BIT_CY + BIT_CY / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        b[i] = tx;
        repeat (BIT_CY) @(posedge clk);
      end
      check(tx == 1'b1, "stop bit");
      @(posedge tx or posedge clk);
      rxq.push_back(b);
      mech[M_TX_BYTE]++;
    end
  end

  // frame length: start bit to end of stop bit = 10 bit times
  initial begin : frame_timer
    int n;
    wait (mon_on);
    @(negedge tx);
    n = 0;
    while (!(n > 9 * BIT_CY && tx == 1'b1)) begin
      @(posedge clk);
      n++;
    end
    n = 0;
    do begin @(posedge clk); n++; end while (tx == 1'b1 && n < 2 * BIT_CY);
    // n is at least the rest of the stop bit when the next frame follows
    check(n >= BIT_CY / 2, "tx stop bit length");
  end

  task automatic cmd(input logic [7:0] c);
    send_byte(c);
  endtask

  task automatic load16(input logic [7:0] c, input logic [15:0] v);
    send_byte(c);
    send_byte(v[7:0]);
    send_byte(v[15:8]);
  endtask

  task automatic write_mem(input bit td, input logic [15:0] start, input logic [7:0] data[$]);
    load16(8'h18, 16'(data.size()));
    load16(td ? 8'h1D : 8'h1B, start - 16'd1);
    cmd(td ? 8'h21 : 8'h20);
    foreach (data[i]) begin
      send_byte(data[i]);
      if (td) mech[M_TD_WRITE]++; else mech[M_INST_WRITE]++;
    end
  endtask

  task automatic wait_rx(input int n);
    int t = 0;
    while (rxq.size() < n && t < 40 * n * BIT_CY) begin
      @(posedge clk);
      t++;
    end
    check(rxq.size() == n, $sformatf("received %0d of %0d bytes", rxq.size(), n));
    repeat (BIT_CY) @(posedge clk);
  endtask

  task automatic read_mem(input logic [7:0] req, input logic [7:0] ldcmd,
                          input logic [15:0] start, input int n, output logic [7:0] data[$]);
    load16(8'h19, 16'(n));
    load16(ldcmd, start);
    rxq.delete();
    cmd(req);
    wait_rx(n);
    data = rxq;
  endtask

  logic [7:0] regs [1:29];
  task automatic dump_regs();
    load16(8'h19, 16'd29);
    rxq.delete();
    cmd(8'h53);
    wait_rx(29);
    for (int i = 1; i <= 29; i++) regs[i] = (rxq.size() > 29 - i) ? rxq[29 - i] : 8'h00;
    mech[M_REG_DUMP]++;
  endtask

  task automatic run_to_stop(input logic [15:0] pc, input int max_cycles);
    int t = 0;
    cmd(8'h92);                 // reset the processor
    mech[M_RESET_CMD]++;
    load16(8'h1A, pc);
    cmd(8'h91);
    mech[M_RUN]++;
    while (!dut.u_tacp.u_proc.IsStopInstruction && t < max_cycles) begin
      @(posedge clk);
      t++;
    end
    check(dut.u_tacp.u_proc.IsStopInstruction, "program reached Stop");
    if (dut.u_tacp.u_proc.IsStopInstruction) mech[M_STOP_INSTR]++;
    cmd(8'h93);
  endtask

  // ---------------- program builder ----------------
  logic [7:0] prog[$];
  function automatic void op(input logic [7:0] o); prog.push_back(o); endfunction
  function automatic void p16(input logic [15:0] v); prog.push_back(v[7:0]); prog.push_back(v[15:8]); endfunction
  function automatic void p32(input logic [31:0] v); p16(v[15:0]); p16(v[31:16]); endfunction
  function automatic void i16(input logic [7:0] o, input logic [15:0] v); op(o); p16(v); endfunction
  function automatic void i32(input logic [7:0] o, input logic [31:0] v); op(o); p32(v); endfunction
  function automatic void mask(input logic [31:0] cr, input logic [15:0] port); i32(8'h1C, cr); p16(port); endfunction
  function automatic void sendtd(input logic [31:0] cr, input logic [7:0] p); i32(8'h1D, cr); op(p); endfunction
  function automatic void readres(input logic [31:0] cr, input logic [7:0] p); i32(8'h17, cr); op(p); endfunction

  // ---------------- clock pulse counters ----------------
  int clkout_pulses = 0, clkout_hf = 0;
  always @(posedge dut.u_chip.u_tsc.CLK_Out) begin
    clkout_pulses++;
    if (dut.u_chip.u_tsc.u_csaac.CLK_Sel) clkout_hf++;
  end
  always @(posedge clk) begin
    if (dut.u_tacp.u_proc.u_cs.mAddress == {6'h0A, 4'd2}) mech[M_JNZ_LOOP]++;
    if (dut.u_tacp.u_proc.u_cs.mAddress == {6'h08, 4'd2}) mech[M_JCOMPARE]++;
    if (dut.u_tacp.u_proc.u_cs.mAddress == {6'h02, 4'd0}) mech[M_CALL]++;
    if (dut.u_tacp.u_proc.u_cs.mAddress == {6'h1A, 4'd0}) mech[M_RETURN]++;
    if (dut.u_tacp.u_proc.u_cs.mAddress == {6'h21, 4'd0}) mech[M_STORE_UC]++;
    if (dut.u_tacp.u_proc.u_cs.mAddress == {6'h11, 4'd0}) mech[M_LOAD_UC_MEM]++;
    if (dut.u_tacp.u_proc.u_cs.mAddress == {6'h03, 4'd4}) mech[M_COMPARE]++;
    if (dut.u_tacp.u_proc.u_cs.mAddress == {6'h1B, 4'd1}) mech[M_SEND_CW]++;
    if (dut.u_tacp.u_proc.u_cs.mAddress == {6'h14, 4'd5}) mech[M_FREQ_MEAS]++;
  end

  // watchdog
  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  logic [7:0] td[$], res[$], exp_res[$];
  logic [3:0] va[10], vb[10];
  logic       vc[10];

  initial begin
    foreach (mech[i]) mech[i] = 0;
    repeat (20) @(posedge clk);
    reset = 1'b0;
    repeat (20) @(posedge clk);
    mon_on = 1;

    // ===== A: 4-bit adder, ten vectors =====
    prog.delete();
    i16(8'h0D, 16'h0000);          // Load_DCRead 0
    i16(8'h10, 16'hFFFF);          // Load_RCWrite FFFF (results from 0)
    i32(8'h12, 32'd10);            // Load_UC_value 10
    mask(9, 0);                    // select port 0
    mask(0, 0);                    // add port 1 (0 moves to 1, new 0)
    sendtd(0, 8'd1);               // 4 bits: a
    sendtd(0, 8'd2);               // 5 bits: b, cin
    op(8'h01);                     // ApplyAndCapture
    readres(0, 8'd6);              // 8 bits
    op(8'h05);                     // DEC_UC
    i16(8'h0A, 16'h0019);          // JNZ loop
    op(8'h18);                     // ResetCF
    i16(8'h0F, 16'h0000);          // Load_RCRead 0
    i32(8'h03, 32'd9);             // Compare 10 bytes
    op(8'h20);                     // Stop
    check(prog.size() == 58, $sformatf("adder program is 58 bytes (%0d)", prog.size()));
    td.delete(); exp_res.delete();
    for (int i = 0; i < 10; i++) begin
      va[i] = 4'($urandom); vb[i] = 4'($urandom); vc[i] = 1'($urandom);
      td.push_back({4'h0, va[i]});
      td.push_back({3'b000, vc[i], vb[i]});
      exp_res.push_back(8'(va[i] + vb[i] + vc[i]));
    end
    foreach (exp_res[i]) td.push_back(exp_res[i]);
    write_mem(0, 16'h0000, prog);
    write_mem(1, 16'h0000, td);
    run_to_stop(16'h0000, 200_000);
    read_mem(8'h42, 8'h1E, 16'h0000, 20, res);
    for (int i = 0; i < 10; i++) begin
      check(res[i] == exp_res[i], $sformatf("adder result %0d: %h + %h + %0d = %h, got %h",
            i, va[i], vb[i], vc[i], exp_res[i], res[i]));
      check(res[10 + i] == 8'h00, $sformatf("compare result %0d is zero", i));
    end
    dump_regs();
    check(regs[1][4] == 1'b0, "CF clear after a passing compare");
    check({regs[20], regs[19], regs[18], regs[17]} == 32'd0, "user counter ran down to zero");
    check(clkout_pulses == 20, $sformatf("two clock pulses per apply-and-capture (%0d)", clkout_pulses));
    mech[M_AAC] += clkout_pulses / 2;

    // same program, one expected value wrong: the compare flag must rise
    write_mem(1, 16'd24, '{8'(exp_res[4] ^ 8'h10)});
    run_to_stop(16'h0000, 200_000);
    dump_regs();
    check(regs[1][4] == 1'b1, "CF set after a failing compare");
    if (regs[1][4]) mech[M_CF_SET]++;
    read_mem(8'h42, 8'h1E, 16'd14, 1, res);
    check(res[0] == 8'h10, $sformatf("compare difference byte %h", res[0]));

    // read back part of the instruction memory
    read_mem(8'h40, 8'h1B, 16'h0000, 6, res);
    check(res[0] == 8'h0D && res[3] == 8'h10 && res[5] == 8'hFF, "instruction memory upload");
    read_mem(8'h41, 8'h1D, 16'h0000, 2, res);
    check(res[0] == td[0] && res[1] == td[1], "test data memory upload");

    // ===== B: pipelined 8-bit adder at 0x0100 =====
    begin
      logic [7:0]  a8[6], b8[6];
      logic        c8[6];
      logic [18:0] st;
      prog.delete();
      i16(8'h0D, 16'h0100);
      i16(8'h10, 16'h00FF);        // results from 0x0100
      i32(8'h12, 32'd6);
      mask(9, 0);                  // port 0 ...
      mask(2, 2);                  // ... moves to 3, port 2 added
      sendtd(1, 8'd5);             // 2 x 8 bits
      sendtd(0, 8'd0);             // 3 bits
      op(8'h01);
      op(8'h01);
      readres(1, 8'd6);            // 2 x 8 bits
      op(8'h05);
      i16(8'h0A, 16'h0100 + 16'd25);
      op(8'h20);
      td.delete();
      for (int i = 0; i < 6; i++) begin
        a8[i] = 8'($urandom); b8[i] = 8'($urandom); c8[i] = 1'($urandom);
        st = {c8[i], b8[i], a8[i], 2'b00};   // first two bits fall off the 17-bit port
        td.push_back(st[7:0]); td.push_back(st[15:8]); td.push_back({5'b0, st[18:16]});
      end
      write_mem(0, 16'h0100, prog);
      write_mem(1, 16'h0100, td);
      clkout_pulses = 0;
      run_to_stop(16'h0100, 300_000);
      read_mem(8'h42, 8'h1E, 16'h0100, 12, res);
      for (int i = 0; i < 6; i++) begin
        logic [8:0] s;
        s = 9'(a8[i]) + 9'(b8[i]) + 9'(c8[i]);
        check({res[2*i+1][0], res[2*i]} == s && res[2*i+1][7:1] == 0,
              $sformatf("pipelined sum %0d: %h+%h+%0d=%h got %h%h", i, a8[i], b8[i], c8[i], s, res[2*i+1], res[2*i]));
        if ({res[2*i+1][0], res[2*i]} == s) mech[M_PIPE_ADD]++;
      end
      check(clkout_pulses == 24, $sformatf("four pulses per pipelined vector (%0d)", clkout_pulses));
      mech[M_AAC] += clkout_pulses / 2;
    end

    // ===== C: user counter, jumps, call/return, break point, single step =====
    prog.delete();
    i32(8'h12, 32'h12345678);      // 0x200
    i16(8'h10, 16'h08FF);          // 0x205
    op(8'h21);                     // 0x208 Store_UC -> 0x900..0x903
    i32(8'h12, 32'h0);             // 0x209
    i16(8'h10, 16'h0900);          // 0x20E (loads read from the address itself)
    op(8'h11);                     // 0x211 Load_UC_Mem
    op(8'h18);                     // 0x212 ResetCF
    i16(8'h08, 16'h0217);          // 0x213 JCompareCorrect -> 0x217
    op(8'h06);                     // 0x216 INC_CW (skipped)
    i16(8'h02, 16'h021E);          // 0x217 Call 0x21E
    op(8'h04);                     // 0x21A DEC_CW (runs after return)
    op(8'h15);                     // 0x21B NOP
    op(8'h20);                     // 0x21C Stop
    op(8'h15);                     // 0x21D
    op(8'h07);                     // 0x21E INC_UC
    op(8'h1A);                     // 0x21F Return
    write_mem(0, 16'h0200, prog);
    load16(8'h9F, 16'h021B);       // break point at the NOP
    cmd(8'h92);
    load16(8'h1A, 16'h0200);
    cmd(8'h91);
    repeat (2000) @(posedge clk);
    check(dut.u_tacp.u_comm.BreakF && !dut.u_tacp.u_proc.IsStopInstruction, "halted at break point");
    dump_regs();
    check({regs[4], regs[3]} == 16'h021B, $sformatf("PC at break point (%h%h)", regs[4], regs[3]));
    if ({regs[4], regs[3]} == 16'h021B) mech[M_BREAK]++;
    check({regs[20], regs[19], regs[18], regs[17]} == 32'h12345679, $sformatf("UC stored, reloaded and incremented (%h%h%h%h)", regs[20], regs[19], regs[18], regs[17]));
    check({regs[22], regs[21]} == 16'hFFFF, "JCompareCorrect skipped INC_CW, DEC_CW ran");
    check({regs[16], regs[15]} == 16'h0000, "stack pointer back to zero");
    cmd(8'h90);                    // single step over the NOP
    mech[M_STEP]++;
    repeat (4000) @(posedge clk);
    check(dut.u_tacp.u_proc.IsStopInstruction, "step then run reaches Stop");
    cmd(8'h93);
    load16(8'h9F, 16'hFFFF);
    read_mem(8'h42, 8'h1E, 16'h0900, 4, res);
    check(res[0] == 8'h78 && res[1] == 8'h56 && res[2] == 8'h34 && res[3] == 8'h12, "Store_UC bytes");
    read_mem(8'h40, 8'h1B, 16'hFFFE, 2, res);
    check(res[0] == 8'h1A && res[1] == 8'h02, $sformatf("return address on stack (%h %h)", res[1], res[0]));

    // ===== D: loop-back through port 7 (18-bit application port) =====
    begin
      logic [17:0] tapm;
      logic [7:0]  tdm;
      logic [7:0]  words[4];
      int          nb[4];
      words = '{8'h22, 8'h76, 8'h07, 8'h03};
      nb    = '{8, 7, 3, 8};
      prog.delete();
      i16(8'h0D, 16'h0300);
      mask(9, 7);
      op(8'h23);                   // ClearTD
      for (int w = 0; w < 4; w++) sendtd(0, 8'(nb[w] - 3));
      op(8'h20);
      write_mem(0, 16'h0300, prog);
      td.delete();
      foreach (words[w]) td.push_back(words[w]);
      write_mem(1, 16'h0300, td);
      // model: port cleared at reset and never shifted before
      tapm = dut.u_chip.u_tsc.u_tap3.sreg;
      for (int w = 0; w < 4; w++) begin
        tdm = words[w];
        for (int i = 0; i < nb[w]; i++) begin
          logic o;
          o    = tapm[0];
          tapm = {tdm[0], tapm[17:1]};
          tdm  = {o, tdm[7:1]};
        end
      end
      run_to_stop(16'h0300, 100_000);
      dump_regs();
      check(regs[26] == tdm, $sformatf("loop-back TD %h expected %h", regs[26], tdm));
      check(dut.u_chip.u_tsc.u_tap3.sreg == tapm, "port 7 shift register contents");
      if (regs[26] == tdm) mech[M_LOOPBACK]++;
    end

    // ===== E: selection mask shifted out into SM =====
    prog.delete();
    mask(9, 9);                    // select port 9 only
    mask(7, 16'hFFFF);             // shift eight zeros in: the 1 leaves the chain
    op(8'h20);
    write_mem(0, 16'h0400, prog);
    run_to_stop(16'h0400, 100_000);
    dump_regs();
    check(regs[25] == 8'h80, $sformatf("SM after pushing port 9 out: %h", regs[25]));
    if (regs[25] == 8'h80) mech[M_MASK_OUT]++;

    // ===== F: control word, frequency measurement, at-speed capture =====
    for (int k = 0; k < 2; k++) begin
      logic [15:0] cwv;
      real         f, expect_fr;
      int          fr;
      cwv = (k == 0) ? 16'h0010 : 16'h0038;
      f   = (k == 0) ? 325.0 / 8.0 : 325.0;
      prog.delete();
      i16(8'h1E, cwv);             // SetFCW
      i16(8'h1B, 16'h000F);        // SendFCW 16 bits (second byte unused)
      i32(8'h14, 32'd1023);        // MeasureFrequency over 1024 cycles
      i16(8'h16, 16'h000F);        // ReadFrequencyRegister 16 bits
      op(8'h20);
      write_mem(0, 16'h0500, prog);
      run_to_stop(16'h0500, 100_000);
      dump_regs();
      fr = {regs[24], regs[23]};
      expect_fr = f * 1024.0 / 50.0;
      check(dut.u_chip.u_tsc.u_ccg.cw == cwv, "control word reached the generator");
      check(real'(fr) > expect_fr * 0.97 && real'(fr) < expect_fr * 1.03,
            $sformatf("FR %0d for %0.2f MHz (expected about %0.0f)", fr, f, expect_fr));
    end
    // at-speed apply and capture on the adder at 325 MHz
    prog.delete();
    i16(8'h0D, 16'h0000);
    i16(8'h10, 16'h09FF);
    mask(9, 0);
    mask(0, 0);
    sendtd(0, 8'd1);
    sendtd(0, 8'd2);
    op(8'h1F);                     // SetHFClock
    op(8'h01);
    op(8'h19);                     // ResetHFClock
    readres(0, 8'd6);
    op(8'h20);
    write_mem(0, 16'h0600, prog);
    clkout_hf = 0;
    run_to_stop(16'h0600, 100_000);
    read_mem(8'h42, 8'h1E, 16'h0A00, 1, res);
    check(res[0] == exp_res[0], $sformatf("at-speed result %h expected %h", res[0], exp_res[0]));
    check(clkout_hf == 2, $sformatf("two pulses at the oscillator clock (%0d)", clkout_hf));
    mech[M_AAC_HF] += clkout_hf / 2;

    // ===== G: two bytes through the scan chain of circuit 3 =====
    // path: scan application FF, five chain flip-flops, scan result FF
    // (7 stages); after 16 bits in, the next 7 bits out are bits 1..7 of
    // the second byte
    begin
      logic [7:0] x0, x1;
      x0 = 8'($urandom); x1 = 8'($urandom);
      prog.delete();
      i16(8'h0D, 16'h0B00);          // Load_DCRead
      i16(8'h10, 16'h0AFF);          // Load_RCWrite (result at 0B00)
      mask(9, 6);                    // select port 6 only
      sendtd(1, 8'd5);               // two bytes of 8 bits
      readres(0, 8'd6);              // 8 bits back
      op(8'h20);
      td.delete(); td.push_back(x0); td.push_back(x1);
      write_mem(1, 16'h0B00, td);
      write_mem(0, 16'h0700, prog);
      run_to_stop(16'h0700, 100_000);
      read_mem(8'h42, 8'h1E, 16'h0B00, 1, res);
      check(res[0][6:0] == x1[7:1], $sformatf("scan chain returned %h for byte %h", res[0], x1));
      if (res[0][6:0] == x1[7:1]) mech[M_SCAN]++;
    end

    // ===== H: the published example vectors for both adders =====
    // 4-bit adder: ten vectors of two bytes (4 + 5 bits), ten expected sums;
    // pipelined adder: ten vectors of three bytes (8 + 4 + 5 bits), ten
    // expected 9-bit sums of two bytes each. Both programs end with a
    // compare, which must leave CF clear.
    begin
      logic [7:0] ex_td4 [$], ex_exp4 [$], ex_td8 [$], ex_exp8 [$];
      ex_td4  = '{8'h02, 8'h16, 8'h07, 8'h03, 8'h06, 8'h0C, 8'h04, 8'h31, 8'hBD, 8'h1E,
                  8'h04, 8'h1C, 8'hCB, 8'h61, 8'h01, 8'h09, 8'hA2, 8'h21, 8'h04, 8'h0A};
      ex_exp4 = '{8'h09, 8'h0A, 8'h12, 8'h06, 8'h1C, 8'h11, 8'h0C, 8'h0A, 8'h03, 8'h0E};
      ex_td8  = '{8'h7C, 8'h01, 8'h1D, 8'hA3, 8'h61, 8'h02, 8'h19, 8'h15, 8'h3C, 8'h57,
                  8'h16, 8'h8B, 8'h06, 8'h0D, 8'h3D, 8'h01, 8'h03, 8'h00, 8'h11, 8'h76,
                  8'h07, 8'h0E, 8'h33, 8'h2E, 8'hB3, 8'h55, 8'h03, 8'h0C, 8'h96, 8'h43};
      ex_exp8 = '{8'h4E, 8'h01, 8'hC4, 8'h00, 8'hDF, 8'h00, 8'h0D, 8'h01, 8'hE4, 8'h00,
                  8'h04, 8'h00, 8'h87, 8'h00, 8'hF1, 8'h00, 8'hE8, 8'h00, 8'h42, 8'h00};
      // 4-bit adder: program A is still at address 0
      td = ex_td4;
      foreach (ex_exp4[i]) td.push_back(ex_exp4[i]);
      write_mem(1, 16'h0000, td);
      run_to_stop(16'h0000, 200_000);
      read_mem(8'h42, 8'h1E, 16'h0000, 20, res);
      for (int i = 0; i < 10; i++) begin
        check(res[i] == ex_exp4[i], $sformatf("example adder vector %0d: %h expected %h", i, res[i], ex_exp4[i]));
        check(res[10 + i] == 8'h00, $sformatf("example adder compare %0d", i));
      end
      dump_regs();
      check(regs[1][4] == 1'b0, "CF clear after the example adder test");
      // pipelined adder at 0x0C00
      prog.delete();
      i16(8'h0D, 16'h0C00);          // Load_DCRead
      i16(8'h10, 16'h0BFF);          // Load_RCWrite (results from 0C00)
      i32(8'h12, 32'd10);            // ten vectors
      mask(9, 0);
      mask(2, 2);                    // ports 2 and 3
      sendtd(0, 8'd5);               // 8 bits: a
      sendtd(0, 8'd1);               // 4 bits: b[3:0]
      sendtd(0, 8'd2);               // 5 bits: b[7:4], cin
      op(8'h01);
      op(8'h01);                     // two stages
      readres(1, 8'd6);              // 2 x 8 bits
      op(8'h05);
      i16(8'h0A, 16'h0C19);          // JNZ loop
      op(8'h18);
      i16(8'h0F, 16'h0C00);          // Load_RCRead
      i32(8'h03, 32'd19);            // Compare 20 bytes
      op(8'h20);
      td = ex_td8;
      foreach (ex_exp8[i]) td.push_back(ex_exp8[i]);
      write_mem(0, 16'h0C00, prog);
      write_mem(1, 16'h0C00, td);
      run_to_stop(16'h0C00, 400_000);
      read_mem(8'h42, 8'h1E, 16'h0C00, 40, res);
      for (int i = 0; i < 20; i++) begin
        check(res[i] == ex_exp8[i], $sformatf("example pipelined byte %0d: %h expected %h", i, res[i], ex_exp8[i]));
        check(res[20 + i] == 8'h00, $sformatf("example pipelined compare %0d", i));
      end
      dump_regs();
      check(regs[1][4] == 1'b0, "CF clear after the example pipelined test");
      if (regs[1][4] == 1'b0) mech[M_EXAMPLE]++;
    end

    // ===== mechanism summary =====
    for (int i = 0; i < M_NUM; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-14s %0d", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
