// hamming_enc_tb: checks the Hamming encoder at both widths the link uses.
//
// DATA_W = 8: every byte is compared with the explicit parity equations of the
// reference model, plus the link's vectors 8'hFF -> 12'hEEF and 8'h1A -> 12'h92A.
// DATA_W = 12: every 12-bit value is compared with the 17-bit reference
// encoder, plus 12'hC04 -> 17'h05208.
module hamming_enc_tb;
  import edac_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  d8;
  logic [11:0] c8;
  logic [11:0] d12;
  logic [16:0] c17;

  hamming_enc #(.DATA_W(8))  dut8  (.data_i(d8),  .code_o(c8));
  hamming_enc #(.DATA_W(12)) dut12 (.data_i(d12), .code_o(c17));

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
    d8 = 8'hFF; d12 = 12'hC04; #1;
    check("FF", 32'(c8), 32'h0EEF);
    check("C04", 32'(c17), 32'h05208);
    d8 = 8'h1A; #1;
    check("1A", 32'(c8), 32'h092A);
    for (int d = 0; d < 256; d++) begin
      d8 = 8'(d); #1;
      check($sformatf("enc8 %02h", d), 32'(c8), 32'(ref_enc8(8'(d))));
    end
    for (int d = 0; d < 4096; d++) begin
      d12 = 12'(d); #1;
      check($sformatf("enc12 %03h", d), 32'(c17), 32'(ref_enc12(12'(d))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
