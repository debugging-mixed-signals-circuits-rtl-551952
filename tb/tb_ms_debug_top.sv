// End-to-end testbench of ms_debug_top at its default sizes (12-bit digital
// and analog Condition Detector Registers), driven only through the test
// access port, in the arrangement of the case-study circuit: a triangle wave
// of +-10 V on analog input 2 of a 4:1 analog multiplexer (EN,S1,S0 pins =
// 1,1,0), the multiplexer output converted by the mission ADC (into the
// Digital Condition Detector Register) and, through analog bus AB2, by the
// test ADC (into the Analog Condition Detector Register). Both ADCs are
// ideal 12-bit +-10 V models.
//
// Sequence: BYPASS check; SELCON loads (C2D..VS0) = 0110_1010 (digital <A,
// analog >A, VCO = OR); SAMPLE/PRELOAD2 loads limit A = 011001101011
// (digital) and 110011010101 (analog) and its capture is checked; PROBE2
// shifts all ones into the capture/shift stages (update blocked); Run-Test/
// Idle: VCO must equal AVC OR DVC computed from the ADC words and from the
// voltage. Then the AND selection (0110_1011, VCO never high), the DVC and
// AVC selections, a range condition with limit B, INTEST2 (core driven from
// the limit-A update stages), the gating of VCO by the TAP state and by the
// instruction, and the breakpoint clock stop. Each of these mechanisms is
// counted and a mechanism that never occurs counts as a failure.
`timescale 1ns/1ps
module tb_ms_debug_top;
  import cdd_pkg::*;

  localparam int ND = 12, NA = 12;
  localparam logic [ND-1:0] DIG_A = 12'b011001101011;   // about -2 V
  localparam logic [NA-1:0] ANA_A = 12'b110011010101;   // about +6 V
  localparam time TCK_HALF = 50ns;

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b0;
  logic tdo, tdo_en, vco, avc, dvc, mission_clk;
  logic ext_clk = 1'b0;
  logic [2:0] mux_pins = 3'b110, mux_ctl;
  logic [ND-1:0] adc1_code, mission_din;
  logic [NA-1:0] adc2_code;
  tap_state_t tap_state;
  logic [IR_W-1:0] ir;
  logic tck_run = 1'b1;

  real vin2 = 0.0, vnode;

  ms_debug_top dut (.*);

  amux4_model u_mux (.in0(1.0), .in1(-1.0), .in2(vin2), .in3(3.3),
                     .en(mux_ctl[2]), .s1(mux_ctl[1]), .s0(mux_ctl[0]), .out(vnode));
  // mission ADC with an injectable fault: its MSB can be forced to 0
  logic [ND-1:0] adc1_ideal;
  logic adc1_msb_stuck0 = 1'b0;
  adc_model #(.N(ND)) u_adc1 (.vin(vnode), .code(adc1_ideal));
  assign adc1_code = adc1_msb_stuck0 ? {1'b0, adc1_ideal[ND-2:0]} : adc1_ideal;
  adc_model #(.N(NA)) u_adc2 (.vin(vnode), .code(adc2_code));   // via AB2

  always #(TCK_HALF) if (tck_run) tck = ~tck; else tck = 1'b0;
  always #7ns ext_clk = ~ext_clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_bypass = 0, n_selcon = 0, n_sample2 = 0, n_probe2_keepA = 0;
  int n_avc = 0, n_dvc = 0, n_vco_or = 0, n_and_blocked = 0, n_vs00 = 0, n_vs01 = 0;
  int n_state_gate = 0, n_instr_gate = 0, n_range = 0, n_intest2 = 0, n_clkstop = 0;
  int n_readback = 0, n_and_fault = 0;

  initial begin
    #60ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // ---------------- JTAG driver ----------------
  task automatic clk(logic m, logic d, output logic out);
    @(negedge tck); tms = m; tdi = d;
    @(posedge tck); out = tdo;
    #1ns;
  endtask

  task automatic tap_reset;
    logic x;
    repeat (5) clk(1'b1, 1'b0, x);
    clk(1'b0, 1'b0, x);                       // Run-Test/Idle
  endtask

  // from Run-Test/Idle to Run-Test/Idle
  task automatic shift_ir(logic [7:0] v, output logic [7:0] out);
    logic x;
    clk(1, 0, x); clk(1, 0, x); clk(0, 0, x); clk(0, 0, x);   // Sel-DR, Sel-IR, Cap-IR, Shift-IR
    for (int b = 0; b < 8; b++) clk(b == 7, v[b], out[b]);
    clk(1, 0, x); clk(0, 0, x);                               // Update-IR, RTI
  endtask

  task automatic shift_dr(int n, logic [63:0] v, output logic [63:0] out);
    logic x;
    out = '0;
    clk(1, 0, x); clk(0, 0, x); clk(0, 0, x);                 // Sel-DR, Cap-DR, Shift-DR
    for (int b = 0; b < n; b++) clk(b == n - 1, v[b], out[b]);
    clk(1, 0, x); clk(0, 0, x);                               // Update-DR, RTI
  endtask

  task automatic load_ir(logic [7:0] v);
    logic [7:0] o;
    shift_ir(v, o);
    chk("IR capture pattern", o, 8'h01);
    chk("IR loaded", ir, v);
  endtask

  // ---------------- references ----------------
  function automatic logic ref_cmp(cond_op_t o, int x, int a, int b);
    unique case (o)
      OP_EQ:  return ((x & b) == (a & b));
      OP_NE:  return ((x & b) != (a & b));
      OP_GT:  return x >  a;
      OP_LT:  return x <  a;
      OP_GE:  return x >= a;
      OP_LE:  return x <= a;
      OP_IN:  return (x >= a) && (x <= b);
      default: return !((x >= a) && (x <= b));
    endcase
  endfunction

  function automatic real tri_wave(real t_us);   // 1 ms period, +-10 V
    real ph;
    ph = t_us - 1000.0 * $floor(t_us / 1000.0);
    return (ph < 500.0) ? (-10.0 + ph * 0.04) : (10.0 - (ph - 500.0) * 0.04);
  endfunction

  // run the triangle wave for `us` microseconds with TCK stopped in RTI
  // and compare the detector outputs with the reference every microsecond
  task automatic run_wave(int us, cond_op_t od, cond_op_t oa, logic [1:0] vs,
                          int da, int db, int aa, int ab, string tag);
    logic pa, pd;
    pa = 0; pd = 0;
    tck_run = 1'b0;
    for (int t = 0; t < us; t++) begin
      logic ea, ed, ev;
      vin2 = tri_wave(real'(t));
      #1us;
      ed = ref_cmp(od, int'(adc1_code), da, db);
      ea = ref_cmp(oa, int'(adc2_code), aa, ab);
      unique case (vs)
        2'b00: ev = ed;
        2'b01: ev = ea;
        2'b10: ev = ed | ea;
        default: ev = ed & ea;
      endcase
      chk({tag, " DVC"}, dvc, ed);
      chk({tag, " AVC"}, avc, ea);
      chk({tag, " VCO"}, vco, ev);
      chk({tag, " state"}, tap_state, ST_RTI);
      // the case-study thresholds in volts: AVC above +6 V, DVC below -2 V
      if (oa == OP_GT && aa == int'(ANA_A)) begin
        if (vnode > 6.1)  chk({tag, " AVC above +6 V"}, avc, 1'b1);
        if (vnode < 5.99) chk({tag, " AVC below +6 V"}, avc, 1'b0);
      end
      if (od == OP_LT && da == int'(DIG_A) && !adc1_msb_stuck0) begin
        if (vnode < -2.0)  chk({tag, " DVC below -2 V"}, dvc, 1'b1);
        if (vnode > -1.95) chk({tag, " DVC above -2 V"}, dvc, 1'b0);
      end
      if (avc && !pa) n_avc++;
      if (dvc && !pd) n_dvc++;
      pa = avc; pd = dvc;
      if (vs == 2'b10 && vco) n_vco_or++;
      if (vs == 2'b11 && (avc || dvc) && !vco) n_and_blocked++;
      if (vs == 2'b11 && vco) n_and_fault++;
      if (vs == 2'b11 && !adc1_msb_stuck0) chk({tag, " AND never high"}, vco, 1'b0);
      if (vs == 2'b00 && vco) n_vs00++;
      if (vs == 2'b01 && vco) n_vs01++;
      if (oa == OP_IN && avc) n_range++;
      // breakpoint clock: held low while VCO is high
      if (vco) begin
        logic c;
        c = mission_clk;
        #30ns;
        chk({tag, " clock stopped"}, {c, mission_clk}, 2'b00);
        n_clkstop++;
      end
    end
    tck_run = 1'b1;
    #(2 * TCK_HALF);
  endtask

  // ---------------- test sequence ----------------
  initial begin
    logic [63:0] o;
    logic [7:0] o8;
    vin2 = 0.0;
    #120ns trst_n = 1'b1;
    tap_reset;
    chk("TLR -> BYPASS", ir, INS_BYPASS);
    chk("RTI code", tap_state, 4'hC);

    // bypass: a pattern comes back delayed by one bit
    shift_dr(16, 64'h0000_0000_0000_B5A3, o);
    chk("bypass", o[15:0], 16'h6B46);
    n_bypass++;

    // 1) configuration: digital <A, analog >A, VCO = DVC OR AVC
    load_ir(INS_SELCON);
    shift_dr(8, 64'h6A, o);
    chk("DCR reset contents", o[7:0], 8'h00);
    n_selcon++;
    shift_dr(8, 64'h6A, o);
    chk("DCR read back", o[7:0], 8'h6A);
    n_readback++;

    // 2) limit A for both registers; capture checks pins and ADC words
    load_ir(INS_SAMPLE2);
    vin2 = 4.0; #1us;
    begin
      logic [26:0] exp_cap;
      exp_cap = {mux_pins, adc1_code, adc2_code};
      shift_dr(27, {37'b0, 3'b110, DIG_A, ANA_A}, o);
      chk("SAMPLE/PRELOAD2 capture", o[26:0], exp_cap);
    end
    n_sample2++;
    // VCO is only enabled by EXTEST2, PROBE2, INTEST2
    tck_run = 1'b0;
    vin2 = 9.0; #2us;
    chk("VCO off under SAMPLE/PRELOAD2", vco, 1'b0);
    chk("AVC on (>A)", avc, 1'b1);
    if (avc && !vco) n_instr_gate++;
    tck_run = 1'b1; #(2 * TCK_HALF);

    // 3) mask/limit B = all ones under PROBE2; limit A must survive
    load_ir(INS_PROBE2);
    shift_dr(27, {37'b0, 3'b110, {ND{1'b1}}, {NA{1'b1}}}, o);
    chk("PROBE2 capture of EN,S1,S0 pins", o[26:24], mux_pins);
    // check limit A survived: +9 V is above A, -9 V below the digital A
    tck_run = 1'b0;
    vin2 = 9.0; #2us;
    chk("limit A kept (analog)", avc, 1'b1);
    vin2 = -9.0; #2us;
    chk("limit A kept (digital)", dvc, 1'b1);
    vin2 = 0.0; #2us;
    chk("no condition at 0 V", {avc, dvc}, 2'b00);
    if (!avc && !dvc) n_probe2_keepA++;
    tck_run = 1'b1; #(2 * TCK_HALF);

    // VCO gated by the TAP state: condition true, but not in Run-Test/Idle
    vin2 = 9.0;
    begin
      logic x;
      clk(1, 0, x); clk(0, 0, x); clk(0, 0, x);  // Select-DR, Capture-DR, Shift-DR
      clk(1, 0, x); clk(0, 0, x);                // Exit1-DR, Pause-DR
      chk("state Pause-DR", tap_state, ST_PAUSE_DR);
      chk("AVC in Pause-DR", avc, 1'b1);
      chk("VCO off outside RTI", vco, 1'b0);
      if (avc && !vco) n_state_gate++;
      clk(1, 0, x); clk(1, 0, x); clk(0, 0, x);  // Exit2-DR, Update-DR, RTI
    end
    // that scan shifted nothing: the capture/shift stages now hold the
    // captured words. Re-load all ones under PROBE2.
    shift_dr(27, {37'b0, 3'b110, {ND{1'b1}}, {NA{1'b1}}}, o);
    chk("VCO on in RTI", vco, 1'b1);

    // 4) triangle wave, OR
    run_wave(3000, OP_LT, OP_GT, 2'b10, DIG_A, 4095, ANA_A, 4095, "OR");

    // 5) AND selection: VCO must never go high
    load_ir(INS_SELCON);
    shift_dr(8, 64'h6B, o);
    chk("DCR previous", o[7:0], 8'h6A);
    n_selcon++;
    load_ir(INS_PROBE2);
    shift_dr(27, {37'b0, 3'b110, {ND{1'b1}}, {NA{1'b1}}}, o);
    run_wave(3000, OP_LT, OP_GT, 2'b11, DIG_A, 4095, ANA_A, 4095, "AND");

    // 5b) same AND set-up with a faulty mission ADC (MSB stuck at 0): above
    //     +6 V the converted word reads below -2 V, and VCO flags the fault
    adc1_msb_stuck0 = 1'b1;
    run_wave(2000, OP_LT, OP_GT, 2'b11, DIG_A, 4095, ANA_A, 4095, "AND-FAULT");
    adc1_msb_stuck0 = 1'b0;

    // 6) DVC only, then AVC only
    load_ir(INS_SELCON); shift_dr(8, 64'h68, o); n_selcon++;
    load_ir(INS_PROBE2); shift_dr(27, {37'b0, 3'b110, {ND{1'b1}}, {NA{1'b1}}}, o);
    run_wave(1000, OP_LT, OP_GT, 2'b00, DIG_A, 4095, ANA_A, 4095, "DVC");
    load_ir(INS_SELCON); shift_dr(8, 64'h69, o); n_selcon++;
    load_ir(INS_PROBE2); shift_dr(27, {37'b0, 3'b110, {ND{1'b1}}, {NA{1'b1}}}, o);
    run_wave(1000, OP_LT, OP_GT, 2'b01, DIG_A, 4095, ANA_A, 4095, "AVC");

    // 7) range on the analog side: in [-1 V, +1 V]; digital =A with mask
    //    (upper 4 bits only), VCO = AVC OR DVC
    begin
      int ra, rb, da, dm;
      ra = 1843; rb = 2252;       // -1 V .. +1 V on the +-10 V, 12-bit scale
      da = 12'h300; dm = 12'hF00; // word in 0x300..0x3FF, about -6.25 V .. -5.0 V
      load_ir(INS_SELCON); shift_dr(8, {56'b0, OP_EQ, OP_IN, 2'b10}, o); n_selcon++;
      load_ir(INS_SAMPLE2); shift_dr(27, {37'b0, 3'b110, 12'(da), 12'(ra)}, o); n_sample2++;
      load_ir(INS_PROBE2);  shift_dr(27, {37'b0, 3'b110, 12'(dm), 12'(rb)}, o);
      run_wave(2000, OP_EQ, OP_IN, 2'b10, da, dm, ra, rb, "RANGE");
    end

    // 8) INTEST2: the core is driven from the update stages (limit A and
    //    the preloaded EN,S1,S0); the mux is then controlled by 011 -> in3
    load_ir(INS_SAMPLE2); shift_dr(27, {37'b0, 3'b011, DIG_A, ANA_A}, o); n_sample2++;
    load_ir(INS_INTEST2);
    chk("INTEST2 drives digital core with limit A", mission_din, DIG_A);
    chk("INTEST2 drives mux control", mux_ctl, 3'b011);
    if (mission_din == DIG_A) n_intest2++;
    load_ir(INS_BYPASS);
    chk("normal mode mux control", mux_ctl, mux_pins);
    chk("normal mode digital core", mission_din, adc1_code);

    // mechanism summary
    $display("bypass=%0d selcon=%0d sample2=%0d probe2_keepA=%0d avc_rises=%0d dvc_rises=%0d",
             n_bypass, n_selcon, n_sample2, n_probe2_keepA, n_avc, n_dvc);
    $display("vco_or=%0d and_blocked=%0d vs00=%0d vs01=%0d state_gate=%0d instr_gate=%0d",
             n_vco_or, n_and_blocked, n_vs00, n_vs01, n_state_gate, n_instr_gate);
    $display("range=%0d intest2=%0d clkstop=%0d readback=%0d and_fault=%0d", n_range, n_intest2, n_clkstop, n_readback, n_and_fault);
    begin
      int mech [17];
      mech = '{n_bypass, n_selcon, n_sample2, n_probe2_keepA, n_avc, n_dvc, n_vco_or,
               n_and_blocked, n_vs00, n_vs01, n_state_gate, n_instr_gate, n_range,
               n_intest2, n_clkstop, n_readback, n_and_fault};
      foreach (mech[k]) begin
        checks++;
        if (mech[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
