// edac_rx_tb: checks the receiver.
//
// First every row group of the link's result table (four 8'hFF bytes sent as
// 12'hEEF with checksum word 17'h05208): clean, one to four bytes each with one
// corrected bit, and the burst case AB1 EE7 CDE AFD, which must give
// 00 FF 6E 00 and RETRANS 13'h028F. Then random words with random error
// patterns against the reference decoders and checksum rule.
module edac_rx_tb;
  import edac_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [11:0] din [4];
  logic [16:0] din5;
  logic [7:0]  dout [4];
  logic [12:0] retrans;
  logic [7:0]  ref_bytes [4];
  logic [12:0] ref_rt;

  // Reference results follow the received words combinationally.
  always_comb begin
    foreach (ref_bytes[i]) ref_bytes[i] = ref_dec8(din[i]);
    ref_rt = ref_retrans(ref_bytes[0], ref_bytes[1], ref_bytes[2], ref_bytes[3], ref_dec12(din5));
  end

  edac_rx dut (
    .datain1(din[0]), .datain2(din[1]), .datain3(din[2]), .datain4(din[3]), .datain5(din5),
    .zero10('0), .zero11('0),
    .dout1(dout[0]), .dout2(dout[1]), .dout3(dout[2]), .dout4(dout[3]), .retrans(retrans));

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic apply_row(input logic [11:0] a, b, c, d, input logic [7:0] ea, eb, ec, ed,
                           input logic [12:0] er);
    din[0] = a; din[1] = b; din[2] = c; din[3] = d; din5 = 17'h05208;
    #1;
    check($sformatf("row %03h dout1", a), 32'(dout[0]), 32'(ea));
    check($sformatf("row %03h dout2", b), 32'(dout[1]), 32'(eb));
    check($sformatf("row %03h dout3", c), 32'(dout[2]), 32'(ec));
    check($sformatf("row %03h dout4", d), 32'(dout[3]), 32'(ed));
    check("row retrans", 32'(retrans), 32'(er));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply_row(12'hEEF, 12'hEEF, 12'hEEF, 12'hEEF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 13'h0);
    apply_row(12'hEEE, 12'hEEF, 12'hEEF, 12'hEEF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 13'h0);
    apply_row(12'hEEE, 12'hEE7, 12'hEEF, 12'hEEF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 13'h0);
    apply_row(12'hEEE, 12'hEE7, 12'hEEB, 12'hEEF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 13'h0);
    apply_row(12'hEEE, 12'hEE7, 12'hEEB, 12'hEED, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 13'h0);
    apply_row(12'hAB1, 12'hEE7, 12'hCDE, 12'hAFD, 8'h00, 8'hFF, 8'h6E, 8'h00, 13'h028F);
    for (int n = 0; n < 400; n++) begin
      logic [7:0]  b [4];
      logic [11:0] cs;
      foreach (b[i]) begin
        b[i] = 8'($urandom);
        din[i] = ref_enc8(b[i]);
        case ($urandom_range(3))
          0, 1: ;                                                  // clean
          2: din[i] ^= 12'b1 << $urandom_range(11);                 // one bit
          3: din[i] ^= 12'($urandom);                               // anything
        endcase
      end
      cs = ref_checksum(b[0], b[1], b[2], b[3]);
      din5 = ref_enc12(cs);
      if ($urandom_range(3) == 0) din5 ^= 17'b1 << $urandom_range(16);
      #1;
      foreach (dout[i]) check("random byte", 32'(dout[i]), 32'(ref_bytes[i]));
      check("random retrans", 32'(retrans), 32'(ref_rt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
