// tb_table1_sizes: runs the whole design at the three operand sizes of the
// device-utilisation comparison: 4 bits (1 digit), 32 bits (8 digits, the
// default) and 64 bits (16 digits). Each size is an independent instance of
// the design with its own checker; the test ends when all three are done.
module tb_table1_sizes;
  bit done4, done32, done64;
  int c4, c32, c64, f4, f32, f64;
  int checks, failures;

  tb_size_check #(.DIGITS(1))  u_4bit  (.done(done4),  .checks(c4),  .failures(f4));
  tb_size_check #(.DIGITS(8))  u_32bit (.done(done32), .checks(c32), .failures(f32));
  tb_size_check #(.DIGITS(16)) u_64bit (.done(done64), .checks(c64), .failures(f64));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c32 + c64, f4 + f32 + f64 + 1);
    $finish;
  end

  initial begin
    wait (done4 && done32 && done64);
    checks = c4 + c32 + c64;
    failures = f4 + f32 + f64;
    $display("4-bit: %0d checks %0d failures; 32-bit: %0d/%0d; 64-bit: %0d/%0d",
             c4, f4, c32, f32, c64, f64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
