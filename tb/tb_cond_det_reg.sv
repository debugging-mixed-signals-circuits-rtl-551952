// Self-checking testbench of the Condition Detector Register cond_det_reg.
// Loads limit A into the update stages and mask/limit B into the
// capture/shift stages through the scan path, then sweeps the parallel input
// and checks the Valid Condition output of all eight condition types against
// integer comparisons of the words. Also checks the serial path (a word
// shifted through comes out N cycles later), capture of the parallel input
// and the parallel output multiplexer.
`timescale 1ns/1ps
module tb_cond_det_reg;
  import cdd_pkg::*;

  localparam int N = 6;

  logic tck = 1'b0, trst_n = 1'b0;
  dr_ctrl_t ctrl = '0;
  logic mode = 0, si = 0, so, vc;
  logic [N-1:0] pi = '0, po;
  cond_op_t op = OP_EQ;
  int checks = 0, failures = 0;

  cond_det_reg #(.N(N)) dut (.*);

  always #5 tck = ~tck;

  initial begin
    #5000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // shift a word LSB first; returns what came out of so
  task automatic scan(logic [N-1:0] w, output logic [N-1:0] out);
    for (int b = 0; b < N; b++) begin
      @(negedge tck); ctrl.shift = 1; si = w[b];
      @(posedge tck); out[b] = so;
    end
    @(negedge tck); ctrl.shift = 0;
  endtask

  task automatic pulse_update;
    @(negedge tck); ctrl.update = 1;
    @(negedge tck); ctrl.update = 0;
  endtask

  function automatic logic ref_vc(cond_op_t o, int x, int a, int b);
    int m;
    m = b;
    unique case (o)
      OP_EQ:  return ((x & m) == (a & m));
      OP_NE:  return ((x & m) != (a & m));
      OP_GT:  return x >  a;
      OP_LT:  return x <  a;
      OP_GE:  return x >= a;
      OP_LE:  return x <= a;
      OP_IN:  return (x >= a) && (x <= b);
      default: return !((x >= a) && (x <= b));
    endcase
  endfunction

  initial begin
    logic [N-1:0] dummy, got;
    #12 trst_n = 1'b1;

    // serial path: what is shifted in comes out on the next scan
    scan(6'h2D, dummy);
    scan(6'h13, got);
    chk("serial path", got, 6'h2D);

    // capture of the parallel input
    pi = 6'h35;
    @(negedge tck); ctrl.capture = 1;
    @(negedge tck); ctrl.capture = 0;
    scan('0, got);
    chk("capture", got, 6'h35);

    // parallel output multiplexer
    scan(6'h0F, dummy); pulse_update;
    mode = 1; #1 chk("po = U", po, 6'h0F);
    mode = 0; #1 chk("po = PI", po, pi);

    // comparisons: random limits, plus some fixed corner cases
    for (int t = 0; t < 40; t++) begin
      int a, b;
      a = $urandom_range(0, 2**N - 1);
      b = $urandom_range(0, 2**N - 1);
      if (t == 0) begin a = 0;      b = 2**N-1; end
      if (t == 1) begin a = 2**N-1; b = 2**N-1; end
      if (t == 2) begin a = 21;     b = 21;     end
      if (t == 3) begin a = 40;     b = 10;     end
      scan(N'(a), dummy); pulse_update;   // limit A into U
      scan(N'(b), dummy);                 // mask / limit B stays in C/S
      for (int o = 0; o < 8; o++) begin
        op = cond_op_t'(o);
        for (int x = 0; x < 2**N; x++) begin
          pi = N'(x);
          #1 chk($sformatf("op%0d x=%0d a=%0d b=%0d", o, x, a, b), vc, ref_vc(op, x, a, b));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
