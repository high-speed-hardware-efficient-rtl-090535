// tb_fir_comp_tone -- frequency-response run of the compensation filter at its default size.
//
// Sine waves of amplitude 4000 (13-bit full scale is 4096) at normalised frequencies
// F = f / fs = 0 (DC), 0.005, 0.02, 0.05, 0.1, 0.2 and 0.3 (5 to 300 MHz at fs = 1 GHz) are fed
// through the filter one sample per clock. After the pipeline and the 41-sample window have
// filled, the output amplitude is measured over 1000 samples by correlation with a sine and a
// cosine at F (the mean, for DC). It is compared with 4000 * |H(F)| / 8, where H is evaluated in
// the testbench from the 41 coefficient values; the factor 1/8 is the filter's output scaling.
// The tolerance covers the truncation of the 21 products: 4 LSB + 1 % on a tone (in the stop band the
// truncation residue, a few LSB, is larger than the ideal response), 21 LSB on DC.
`timescale 1ns/1ps
module tb_fir_comp_tone;

  localparam int H [21] = '{-3478, 10288, -8633, 3799, -6146, 1921, 1458, 1030, 3502, -2616,
                             1398, -3338, 561, -1579, 394, -216, 1051, 172, 1350, -886, 955};
  localparam int    LAT  = 15;
  localparam int    NMEAS = 1000;
  localparam int    NWARM = 80;
  localparam real   AMP  = 4000.0;
  localparam real   PI   = 3.14159265358979;
  localparam int    NF   = 7;
  localparam real   FREQ [NF] = '{0.0, 0.005, 0.02, 0.05, 0.1, 0.2, 0.3};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [12:0] x_in = '0;
  logic out_valid;
  logic signed [19:0] y_out;
  int checks = 0, failures = 0;

  fir_comp_filter dut (.*);

  always #0.4 clk = ~clk;

  function automatic real hmag(real f);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < 41; k++) begin
      real h = real'(H[(k <= 20) ? k : 40 - k]) / 1024.0;
      re += h * $cos(2.0 * PI * f * k);
      im -= h * $sin(2.0 * PI * f * k);
    end
    return $sqrt(re * re + im * im);
  endfunction

  initial begin : watchdog
    repeat (NF * (NMEAS + NWARM + LAT) + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int fi = 0; fi < NF; fi++) begin
      automatic real f = FREQ[fi];
      automatic real sc = 0.0, ss = 0.0, sm = 0.0, meas, expv, tol;
      automatic int n = 0;
      // n counts input samples; y_out at step n belongs to input sample n - LAT
      for (n = 0; n < NWARM + LAT + NMEAS; n++) begin
        @(negedge clk);
        if (n >= NWARM + LAT) begin
          automatic real ph = 2.0 * PI * f * real'(n - LAT);
          sc += real'(y_out) * $cos(ph);
          ss += real'(y_out) * $sin(ph);
          sm += real'(y_out);
        end
        begin
          automatic real v = AMP * ((f == 0.0) ? 1.0 : $sin(2.0 * PI * f * real'(n)));
          x_in = 13'($rtoi((v >= 0.0) ? v + 0.5 : v - 0.5));   // round to nearest
        end
        in_valid = 1'b1;
      end
      expv = AMP * hmag(f) / 8.0;
      if (f == 0.0) begin
        meas = sm / NMEAS;
        tol  = 21.0;
      end else begin
        meas = 2.0 * $sqrt(sc * sc + ss * ss) / NMEAS;
        tol  = 4.0 + 0.01 * expv;
      end
      $display("F=%5.3f  |H|=%8.5f  output amplitude %10.3f, expected %10.3f", f, hmag(f), meas, expv);
      checks++;
      if (meas > expv + tol || meas < expv - tol) begin
        failures++;
        $display("FAIL F=%0.3f: amplitude %0.3f, expected %0.3f +- %0.3f", f, meas, expv, tol);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
