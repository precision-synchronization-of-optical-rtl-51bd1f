// tb_llrf_pkg: checks the package helpers. sat16 is compared with explicit
// limits; crc8_20 with a CRC computed as the remainder of a polynomial long
// division of {data, 8'h00} by 0x107.
module tb_llrf_pkg;
  import llrf_pkg::*;
  int checks = 0, failures = 0;

  function automatic logic [7:0] crc_ref(input logic [19:0] d);
    logic [27:0] r;
    r = {d, 8'h00};
    for (int k = 27; k >= 8; k--)
      if (r[k]) r[k-:9] = r[k-:9] ^ 9'h107;
    return r[7:0];
  endfunction

  initial begin
    longint v;
    for (int n = 0; n < 2000; n++) begin
      v = longint'($urandom_range(0, 200000)) - 100000;
      checks++;
      if (sat16(64'(v)) != 16'(v > 32767 ? 32767 : (v < -32768 ? -32768 : v))) failures++;
    end
    for (int n = 0; n < 2000; n++) begin
      logic [19:0] d;
      d = 20'($urandom);
      checks++;
      if (crc8_20(d) != crc_ref(d)) failures++;
    end
    checks++;
    if (crc8_20(20'h0) != 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
