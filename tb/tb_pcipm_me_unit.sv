// tb_pcipm_me_unit: end-to-end self-check of the PCIPM matching unit at its
// only configuration (8-bit pixels, 27-bit codes).
//
// 1. The published sample: reference pixel 0 held while the test pixel steps
//    through 255, 0 and 204 every 20 ns; the output is sampled 6 ns after
//    each change (the unit's cycle time) and must read 128, 0 and 204.
// 2. All 65,536 pixel pairs against a reference model that pre-codes both
//    pixels from their integer value, XORs the codes and sums the level
//    weights; the result must also be symmetric in the two pixels and 0 for
//    equal pixels.
// 3. Each mechanism of the code is counted and must occur at least once: a
//    two-bit and a three-bit top-level disagreement, an auxiliary-pair and an
//    a/g-pair hit at every level, a one-bit disagreement that adds nothing
//    (neighbouring fields), and a carry rippling inside the adder.
// Prints one TB_RESULT line.
`timescale 1ns/1ps
module tb_pcipm_me_unit;
  logic [7:0] pix_a, pix_b, diff;
  logic carry;
  int checks = 0, failures = 0;

  int n_top_two, n_top_three, n_silent_one_bit, n_adder_carry;
  int n_aux_hit[6];
  int n_ag_hit[6];

  pcipm_me_unit dut (.pix_a(pix_a), .pix_b(pix_b), .diff(diff), .carry(carry));

  // Reference pre-coder, written from the integer value of the pixel.
  function automatic logic [26:0] ref_code(input int v);
    logic [26:0] c;
    int gv, gkm1;
    c = '0;
    gv = v ^ (v >> 1);
    c[26] = (v >= 128);
    c[25] = (v >= 64);
    c[24] = (v >= 192);
    for (int k = 1; k <= 6; k++) begin
      gkm1 = (gv >> (k - 1)) & 1;
      c[4*k-1] = 1'((gkm1 != 0) && (((gv >> k) & 3) != 0));
      c[4*k-2] = c[4*k-1];
      c[4*k-3] = 1'((v >> k) & 1);
      c[4*k-4] = 1'(gkm1);
    end
    return c;
  endfunction

  // Reference difference; also updates the mechanism counters.
  function automatic int ref_diff(input int x, input int y, input bit count);
    logic [26:0] d;
    int top, opa, opb;
    d = ref_code(x) ^ ref_code(y);
    top = int'(d[26]) + int'(d[25]) + int'(d[24]);
    opa = (top == 2) ? 128 : 0;
    opb = (top == 3) ? 128 : 0;
    if (count && top == 2) n_top_two++;
    if (count && top == 3) n_top_three++;
    for (int k = 1; k <= 6; k++) begin
      if (d[4*k-1] && d[4*k-2]) begin
        opa += 1 << (k - 1);
        if (count) n_aux_hit[k-1]++;
      end
      if (d[4*k-3] && d[4*k-4]) begin
        opb += 1 << (k - 1);
        if (count) n_ag_hit[k-1]++;
      end
    end
    if (count && (opa & opb) != 0) n_adder_carry++;
    if (count && d != '0 && opa + opb == 0) n_silent_one_bit++;
    return opa + opb;
  endfunction

  task automatic check_pair(input int x, input int y, input int exp_val);
    checks++;
    if (int'({carry, diff}) != exp_val) begin
      failures++;
      if (failures < 20)
        $display("FAIL pix_a=%0d pix_b=%0d -> carry=%b diff=%0d expected %0d",
                 x, y, carry, diff, exp_val);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fig_test[3] = '{255, 0, 204};
    int fig_out[3]  = '{128, 0, 204};
    int sym;
    n_top_two = 0; n_top_three = 0; n_silent_one_bit = 0; n_adder_carry = 0;
    for (int k = 0; k < 6; k++) begin
      n_aux_hit[k] = 0;
      n_ag_hit[k] = 0;
    end

    // 1. Published sample sequence, 20 ns per test pixel.
    pix_a = 8'd0;
    for (int i = 0; i < 3; i++) begin
      pix_b = 8'(fig_test[i]);
      #6;
      check_pair(0, fig_test[i], fig_out[i]);
      #14;
    end

    // 2. Exhaustive comparison with the reference model.
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        pix_a = 8'(x);
        pix_b = 8'(y);
        #1;
        check_pair(x, y, ref_diff(x, y, 1'b1));
        if (x == y) begin
          checks++;
          if (diff != 0) begin
            failures++;
            $display("FAIL equal pixels %0d give %0d", x, diff);
          end
        end
        if (y < x) begin
          pix_a = 8'(y);
          pix_b = 8'(x);
          #1;
          sym = int'(diff);
          checks++;
          if (sym != ref_diff(x, y, 1'b0)) begin
            failures++;
            $display("FAIL asymmetric result for %0d and %0d", x, y);
          end
        end
      end

    // 3. Mechanism coverage.
    $display("top level two bits differ    : %0d", n_top_two);
    $display("top level three bits differ  : %0d", n_top_three);
    $display("one-bit difference, no weight: %0d", n_silent_one_bit);
    $display("adder carry between operands : %0d", n_adder_carry);
    for (int k = 6; k >= 1; k--)
      $display("level %0d aux-pair hits %0d, a/g-pair hits %0d", k,
               n_aux_hit[k-1], n_ag_hit[k-1]);
    checks++;
    if (n_top_two == 0 || n_top_three == 0 || n_silent_one_bit == 0 || n_adder_carry == 0) begin
      failures++;
      $display("FAIL a top-level or adder mechanism never occurred");
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (n_aux_hit[k] == 0 || n_ag_hit[k] == 0) begin
        failures++;
        $display("FAIL level %0d mechanism never occurred", k + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
