// tb_rot13: checks the ROT13 entity on all 256 byte values against a
// modular-arithmetic reference, and on the example 'Hello World' ->
// 'Uryyb Jbeyq' and back.
module tb_rot13;
  import lpw_tb_pkg::*;

  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  rot13 dut (.in_byte, .out_byte);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string a, b;
    a = "Hello World";
    b = "Uryyb Jbeyq";
    for (int v = 0; v < 256; v++) begin
      in_byte = 8'(v);
      #1;
      checks++;
      if (out_byte !== ref_rot13(8'(v))) begin
        failures++;
        $display("FAIL: rot13(%02h) = %02h, expected %02h", v, out_byte, ref_rot13(8'(v)));
      end
    end
    for (int i = 0; i < a.len(); i++) begin
      in_byte = a[i];
      #1;
      checks++;
      if (out_byte !== b[i]) begin
        failures++;
        $display("FAIL: '%c' -> '%c', expected '%c'", a[i], out_byte, b[i]);
      end
      in_byte = b[i];
      #1;
      checks++;
      if (out_byte !== a[i]) begin
        failures++;
        $display("FAIL: '%c' -> '%c', expected '%c'", b[i], out_byte, a[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
