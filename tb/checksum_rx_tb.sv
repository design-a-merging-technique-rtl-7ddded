// checksum_rx_tb: checks the checksum checker and its RETRANS output.
//
// Matching bytes and checksum must give RETRANS = 0; the link's burst-error
// case (checksum 12'hC04, bytes 00 FF 6E 00) must give 13'h028F; random
// corruptions of one byte must give the reference difference, never zero.
module checksum_rx_tb;
  import edac_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0][7:0] bytes;
  logic [11:0]     cs;
  logic [12:0]     retrans;

  checksum_rx dut (.data_i(bytes), .checksum_i(cs), .zero10_i('0), .zero11_i('0),
                   .retrans_o(retrans));

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
    bytes = {4{8'hFF}}; cs = 12'hC04; #1;
    check("FF clean", 32'(retrans), 0);
    bytes = {8'h00, 8'h6E, 8'hFF, 8'h00}; #1;   // dout4..dout1
    check("burst example", 32'(retrans), 32'h028F);
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] b [4];
      int k;
      foreach (b[i]) b[i] = 8'($urandom);
      cs = ref_checksum(b[0], b[1], b[2], b[3]);
      bytes = {b[3], b[2], b[1], b[0]}; #1;
      check("clean", 32'(retrans), 0);
      k = $urandom_range(3);
      b[k] = b[k] ^ 8'($urandom_range(255, 1));
      bytes = {b[3], b[2], b[1], b[0]}; #1;
      check("corrupt", 32'(retrans), 32'(ref_retrans(b[0], b[1], b[2], b[3], cs)));
      checks++;
      if (retrans == 0) begin
        failures++;
        $display("FAIL corrupt byte not flagged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
