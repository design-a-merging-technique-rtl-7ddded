// merge_edac_top_tb: end-to-end test of the whole link at its only size.
//
// Random 32-bit words are sent through transmitter, channel and receiver. The
// channel error pattern of each word is drawn from these classes:
//   clean line                          -> word delivered, RETRANS = 0
//   one data-bit error in 1..4 bytes    -> every byte corrected, RETRANS = 0
//   one error in the checksum codeword  -> checksum corrected, RETRANS = 0
//   one error on a byte's parity bit    -> byte forced to 00, RETRANS raised
//   several errors in one byte (burst)  -> RETRANS raised (checked exactly
//                                          against the reference)
// Every output is compared with the reference model (explicit-equation
// encoders, nearest-codeword decoders, checksum rule). It also replays the
// reference vectors 4 x 8'hFF -> EEF / 05208, 4 x 8'h1A -> 92A and the burst
// row that gives 00 FF 6E 00 with RETRANS 13'h028F. Each mechanism is counted
// and must occur at least once.
module merge_edac_top_tb;
  import edac_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_clean = 0, n_byte_fix = 0, n_four_fix = 0, n_cs_fix = 0, n_zeroed = 0,
      n_retrans = 0, n_burst = 0;

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

  // Reference: what should be sent, and what should come out of the receiver.
  logic [11:0] ref_tx [4];
  logic [16:0] ref_tx5;
  logic [7:0]  ref_out [4];
  logic [12:0] ref_rt;
  always_comb begin
    foreach (ref_tx[i]) ref_tx[i] = ref_enc8(din[i]);
    ref_tx5 = ref_enc12(ref_checksum(din[0], din[1], din[2], din[3]));
    foreach (ref_out[i]) ref_out[i] = ref_dec8(ref_tx[i] ^ err[i]);
    ref_rt = ref_retrans(ref_out[0], ref_out[1], ref_out[2], ref_out[3],
                         ref_dec12(ref_tx5 ^ err5));
  end

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_all(input string what);
    foreach (txw[i]) check({what, " sent byte word"}, 32'(txw[i]), 32'(ref_tx[i]));
    check({what, " sent checksum word"}, 32'(txw5), 32'(ref_tx5));
    foreach (dout[i]) check({what, " received byte"}, 32'(dout[i]), 32'(ref_out[i]));
    check({what, " retrans"}, 32'(retrans), 32'(ref_rt));
    if (retrans != 0) n_retrans++;
  endtask

  // Random position (1-based) that is / is not a power of two.
  function automatic int data_position(input int w);
    int p;
    do p = $urandom_range(w, 1); while (is_pow2(p));
    return p;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reference vectors.
    foreach (din[i]) begin din[i] = 8'hFF; err[i] = '0; end
    err5 = '0;
    #1;
    foreach (txw[i]) check("FF sent", 32'(txw[i]), 32'h0EEF);
    check("FF checksum word", 32'(txw5), 32'h05208);
    check_all("FF");
    err[0] = 12'hEEF ^ 12'hAB1; err[1] = 12'hEEF ^ 12'hEE7;
    err[2] = 12'hEEF ^ 12'hCDE; err[3] = 12'hEEF ^ 12'hAFD;
    #1;
    check("burst dout1", 32'(dout[0]), 32'h00);
    check("burst dout2", 32'(dout[1]), 32'hFF);
    check("burst dout3", 32'(dout[2]), 32'h6E);
    check("burst dout4", 32'(dout[3]), 32'h00);
    check("burst retrans", 32'(retrans), 32'h028F);
    check_all("table burst");
    foreach (din[i]) begin din[i] = 8'h1A; err[i] = '0; end
    #1;
    foreach (txw[i]) check("1A sent", 32'(txw[i]), 32'h092A);
    check_all("1A");

    for (int n = 0; n < 3000; n++) begin
      int cls;
      foreach (din[i]) begin din[i] = 8'($urandom); err[i] = '0; end
      err5 = '0;
      cls = $urandom_range(4);
      case (cls)
        0: n_clean++;
        1: begin                                   // single data-bit errors
          int nb;
          nb = $urandom_range(4, 1);
          for (int b = 0; b < nb; b++) err[b] = 12'b1 << (12 - data_position(12));
          n_byte_fix += nb;
          if (nb == 4) n_four_fix++;
        end
        2: begin                                   // checksum word error
          err5 = 17'b1 << (17 - data_position(17));
          n_cs_fix++;
        end
        3: begin                                   // parity-bit error in a byte
          err[$urandom_range(3)] = 12'b1 << (12 - (1 << $urandom_range(3)));
          n_zeroed++;
        end
        default: begin                             // burst in one byte
          int a, b;
          a = $urandom_range(11); b = (a + 1 + $urandom_range(10)) % 12;
          err[$urandom_range(3)] = (12'b1 << a) | (12'b1 << b) | 12'($urandom);
          n_burst++;
        end
      endcase
      #1;
      check_all("random");
      if (cls inside {0, 1, 2}) begin
        foreach (dout[i]) check("delivered", 32'(dout[i]), 32'(din[i]));
        check("no retransmit", 32'(retrans), 0);
      end
    end

    $display("clean=%0d byte_corrections=%0d four_byte_corrections=%0d checksum_corrections=%0d",
             n_clean, n_byte_fix, n_four_fix, n_cs_fix);
    $display("parity_bit_hits=%0d bursts=%0d retrans_raised=%0d",
             n_zeroed, n_burst, n_retrans);
    checks++; if (n_clean == 0)    begin failures++; $display("FAIL no clean word"); end
    checks++; if (n_byte_fix == 0) begin failures++; $display("FAIL no byte correction"); end
    checks++; if (n_four_fix == 0) begin failures++; $display("FAIL no four-byte correction"); end
    checks++; if (n_cs_fix == 0)   begin failures++; $display("FAIL no checksum correction"); end
    checks++; if (n_zeroed == 0)   begin failures++; $display("FAIL no parity-bit hit"); end
    checks++; if (n_burst == 0)    begin failures++; $display("FAIL no burst"); end
    checks++; if (n_retrans == 0)  begin failures++; $display("FAIL RETRANS never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
