// edac_accuracy_tb: error-handling rates of the whole link on a noisy line.
//
// Every one of the 65 line bits (4 x 12 byte codeword bits + 17 checksum
// codeword bits) flips independently with probability P_PPM parts per million.
// For each sent word the outcome is one of:
//   delivered  - all four bytes right and RETRANS = 0 (clean or corrected)
//   resend     - RETRANS != 0 (the error was detected)
//   silent     - a byte is wrong and RETRANS = 0 (undetected)
// The rates are printed for three line qualities. Checks: a word with at most
// one flipped data-position bit per codeword is always delivered, and the
// share of words that are either delivered or flagged stays at or above 98 %.
module edac_accuracy_tb;
  import edac_ref_pkg::*;

  localparam int WORDS = 4000;

  int checks = 0, failures = 0;

  logic [7:0]  din [4];
  logic [11:0] err [4];
  logic [16:0] err5;
  logic [11:0] txw [4];
  logic [16:0] txw5;
  logic [7:0]  dout [4];
  logic [12:0] retrans;

  merge_edac_top dut (
    .datain1(din[0]), .datain2(din[1]), .datain3(din[2]), .datain4(din[3]),
    .zero10('0), .zero11('0),
    .err1(err[0]), .err2(err[1]), .err3(err[2]), .err4(err[3]), .err5(err5),
    .tx_dout1(txw[0]), .tx_dout2(txw[1]), .tx_dout3(txw[2]), .tx_dout4(txw[3]),
    .tx_dout5(txw5),
    .dout1(dout[0]), .dout2(dout[1]), .dout3(dout[2]), .dout4(dout[3]),
    .retrans(retrans));

  function automatic bit flip(input int ppm);
    return $urandom_range(999_999) < ppm;
  endfunction

  // At most one flipped bit, and not on a parity position.
  function automatic bit correctable(input logic [31:0] e, input int w);
    int p;
    if ($countones(e) == 0) return 1;
    if ($countones(e) > 1) return 0;
    for (int b = 0; b < w; b++) if (e[b]) p = w - b;
    return !is_pow2(p);
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rates [3];
    rates = '{1000, 10000, 30000};   // 0.1 %, 1 %, 3 % bit error rate
    foreach (rates[r]) begin
      int delivered, resend, silent, with_errors;
      delivered = 0; resend = 0; silent = 0; with_errors = 0;
      for (int n = 0; n < WORDS; n++) begin
        bit ok, easy;
        foreach (din[i]) begin
          din[i] = 8'($urandom);
          for (int b = 0; b < 12; b++) err[i][b] = flip(rates[r]);
        end
        for (int b = 0; b < 17; b++) err5[b] = flip(rates[r]);
        #1;
        if (err5 != 0 || err[0] != 0 || err[1] != 0 || err[2] != 0 || err[3] != 0)
          with_errors++;
        ok = 1;
        foreach (dout[i]) if (dout[i] != din[i]) ok = 0;
        if (retrans != 0)  resend++;
        else if (ok)       delivered++;
        else               silent++;
        easy = correctable(32'(err5), 17);
        foreach (err[i]) easy &= correctable(32'(err[i]), 12);
        if (easy) begin
          checks++;
          if (!(ok && retrans == 0)) begin
            failures++;
            $display("FAIL correctable pattern not delivered");
          end
        end
      end
      $display("bit error rate %0d ppm: words with errors %0d of %0d, delivered %0d, resend %0d, silent %0d",
               rates[r], with_errors, WORDS, delivered, resend, silent);
      checks++;
      if ((delivered + resend) * 100 < WORDS * 98) begin
        failures++;
        $display("FAIL fewer than 98 %% of words delivered or flagged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
