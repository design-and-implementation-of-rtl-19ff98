// tb_dkg_addsub: the DKG adder/subtractor against integer arithmetic in both
// modes. Adding: sum mod 10^DIGITS and per-digit decimal carries. Subtracting:
// (a - b) mod 10^DIGITS (ten's complement when a < b) and per-digit decimal
// borrows, the last one set exactly when a < b.
module tb_dkg_addsub;
  localparam int unsigned DIGITS = bcd_pkg::BCD_DIGITS;
  localparam int unsigned N_RANDOM = 5000;
  import bcd_pkg::*;
  import tb_bcd_util_pkg::*;
  localparam int unsigned W = 4 * DIGITS;

  addsub_mode_e mode;
  logic [W-1:0] a, b, s;
  logic [DIGITS-1:0] cout;
  int checks = 0, failures = 0;

  dkg_addsub dut (.mode(mode), .a(a), .b(b), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(addsub_mode_e m, logic [63:0] va, logic [63:0] vb);
    longint unsigned ia, ib, r;
    logic [63:0] exp_s;
    logic [15:0] exp_c;
    mode = m;
    a = va[W-1:0];
    b = vb[W-1:0];
    #1;
    ia = bcd2int(va, DIGITS);
    ib = bcd2int(vb, DIGITS);
    if (m == MODE_ADD) begin
      r = (ia + ib) % pow10(DIGITS);
      exp_c = add_carries(va, vb, DIGITS);
    end else begin
      r = (ia + pow10(DIGITS) - ib) % pow10(DIGITS);
      exp_c = sub_borrows(va, vb, DIGITS);
    end
    exp_s = int2bcd(r, DIGITS);
    checks++;
    if (s !== exp_s[W-1:0] || cout !== exp_c[DIGITS-1:0]) begin
      failures++;
      $display("FAIL mode %s %h, %h gave %h flags %b", m.name(), a, b, s, cout);
    end
    if (m == MODE_SUB) begin
      checks++;
      if (cout[DIGITS-1] !== (ia < ib)) begin
        failures++;
        $display("FAIL final borrow for %h - %h", a, b);
      end
    end
  endtask

  initial begin
    apply(MODE_ADD, int2bcd(pow10(DIGITS) - 1, DIGITS), int2bcd(1, DIGITS));
    apply(MODE_SUB, '0, int2bcd(1, DIGITS));
    apply(MODE_SUB, int2bcd(pow10(DIGITS) / 10, DIGITS), int2bcd(1, DIGITS));
    apply(MODE_SUB, int2bcd(12345, DIGITS), int2bcd(12345, DIGITS));
    for (int i = 0; i < int'(N_RANDOM); i++) begin
      apply(MODE_ADD, rand_bcd(DIGITS), rand_bcd(DIGITS));
      apply(MODE_SUB, rand_bcd(DIGITS), rand_bcd(DIGITS));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
