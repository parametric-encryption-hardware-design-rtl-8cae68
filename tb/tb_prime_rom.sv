// tb_prime_rom: reads every address of a 40-entry table and compares with
// primes found independently by a sieve of Eratosthenes.
module tb_prime_rom;
  logic [5:0] addr;
  logic [7:0] data;
  int checks = 0, failures = 0;

  prime_rom #(.NB_PRIMES(40), .PRIMES_DATA_WIDTH(8), .PRIMES_ADDR_WIDTH(6)) dut (.addr_i(addr), .data_o(data));

  initial begin
    bit composite [256];
    int k;
    for (int i = 0; i < 256; i++) composite[i] = 0;
    for (int i = 2; i < 16; i++) if (!composite[i]) for (int j = i * i; j < 256; j += i) composite[j] = 1;
    k = 0;
    for (int i = 2; i < 256 && k < 40; i++) begin
      if (!composite[i]) begin
        addr = 6'(k);
        #1;
        checks++;
        if (data != 8'(i)) begin failures++; $display("FAIL rom[%0d] = %0d, expected %0d", k, data, i); end
        k++;
      end
    end
    addr = 6'd45;
    #1;
    checks++;
    if (data != 0) begin failures++; $display("FAIL out-of-range address reads %0d", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
