// checksum_tx_tb: checks the checksum generator.
//
// Four bytes of 8'hFF must give 12'hC04 (sum 1020); random bytes and the
// extreme cases 00 and FF are compared with the reference (4096 - sum) mod 4096,
// and the byte sum output with the plain sum.
module checksum_tx_tb;
  import edac_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0][7:0] bytes;
  logic [9:0]      sum;
  logic [11:0]     cs;

  checksum_tx dut (.data_i(bytes), .zero10_i('0), .zero11_i('0), .sum_o(sum), .checksum_o(cs));

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    bytes = {4{8'hFF}}; #1;
    check("FF x4", 32'(cs), 32'h0C04);
    check("FF x4 sum", 32'(sum), 32'd1020);
    bytes = '0; #1;
    check("00 x4", 32'(cs), 32'h000);
    bytes = {4{8'h1A}}; #1;
    check("1A x4", 32'(cs), 32'hF98);
    for (int n = 0; n < 2000; n++) begin
      bytes = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)}; #1;
      check("random cs", 32'(cs), 32'(ref_checksum(bytes[0], bytes[1], bytes[2], bytes[3])));
      check("random sum", 32'(sum),
            32'(int'(bytes[0]) + int'(bytes[1]) + int'(bytes[2]) + int'(bytes[3])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
