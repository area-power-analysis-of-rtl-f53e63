// tb_r4_butterfly: self-checking test of the radix-4 butterfly.
//
// The expected outputs are the 4-point DFT  y_k = sum_m a_m * (-j)^(m*k),
// evaluated term by term with explicit rotations, divided by 4, rounded to
// nearest (halves up) and saturated to 16 bits. Inputs are random values,
// small values and the full-scale corners. A second instance with SHIFT = 0
// is checked against the unscaled DFT on inputs small enough not to
// saturate.
module tb_r4_butterfly;
  import bf_pkg::*;

  int checks = 0;
  int failures = 0;

  cplx_t a [4];
  cplx_t y [4];
  cplx_t y0 [4];

  r4_butterfly #(.SHIFT(2)) u_dut  (.a(a), .y(y));
  r4_butterfly #(.SHIFT(0)) u_dut0 (.a(a), .y(y0));

  function automatic int sat_div(longint v, int sh);
    longint q;
    q = longint'($floor(real'(v) / real'(1 << sh) + 0.5));
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return int'(q);
  endfunction

  task automatic check(bit unscaled);
    longint sr, si, pr, pi;
    for (int k = 0; k < 4; k++) begin
      sr = 0;
      si = 0;
      for (int m = 0; m < 4; m++) begin
        pr = longint'(a[m].re);
        pi = longint'(a[m].im);
        case ((m * k) % 4)
          0: begin sr += pr; si += pi; end   // * 1
          1: begin sr += pi; si -= pr; end   // * -j
          2: begin sr -= pr; si -= pi; end   // * -1
          3: begin sr -= pi; si += pr; end   // * +j
        endcase
      end
      checks++;
      if (int'(y[k].re) != sat_div(sr, 2) || int'(y[k].im) != sat_div(si, 2)) begin
        failures++;
        if (failures < 10)
          $display("FAIL k=%0d got (%0d,%0d) exp (%0d,%0d)", k, y[k].re, y[k].im,
                   sat_div(sr, 2), sat_div(si, 2));
      end
      if (unscaled) begin
        checks++;
        if (longint'(y0[k].re) != sr || longint'(y0[k].im) != si) begin
          failures++;
          if (failures < 10) $display("FAIL unscaled k=%0d", k);
        end
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static sample_t corner [3] = '{16'sh7fff, -16'sh8000, 16'sd0};
    // full-scale corners of every component
    for (int n = 0; n < 6561; n += 7) begin
      int v;
      v = n;
      for (int m = 0; m < 4; m++) begin
        a[m].re = corner[v % 3]; v /= 3;
        a[m].im = corner[(v + m) % 3];
      end
      #1 check(1'b0);
    end
    // random full range
    repeat (3000) begin
      for (int m = 0; m < 4; m++) begin
        a[m].re = sample_t'($urandom);
        a[m].im = sample_t'($urandom);
      end
      #1 check(1'b0);
    end
    // small values: the unscaled instance cannot saturate
    repeat (1000) begin
      for (int m = 0; m < 4; m++) begin
        a[m].re = sample_t'($signed($urandom_range(0, 8191)) - 4096);
        a[m].im = sample_t'($signed($urandom_range(0, 8191)) - 4096);
      end
      #1 check(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
