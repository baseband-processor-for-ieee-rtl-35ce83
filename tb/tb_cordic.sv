// tb_cordic: checks both CORDIC modes against real arithmetic.
// Rotation: random vectors and angles, result compared with
// (x + jy) * exp(j*z) within a small tolerance. Vectoring: random vectors,
// angle compared with atan2 and magnitude with sqrt(x^2 + y^2). Also checks
// the pipeline latency (ITER + 2 clocks).
module tb_cordic;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic r_in_v, v_in_v, r_out_v, v_out_v;
  logic signed [15:0] r_x, r_y, r_ox, r_oy, v_x, v_y, v_ox, v_oy;
  logic [15:0] r_z, r_oz, v_oz;

  cordic #(.VECTOR(1'b0)) u_rot (.clk, .rst_n, .in_valid(r_in_v), .in_x(r_x), .in_y(r_y), .in_z(r_z),
    .out_valid(r_out_v), .out_x(r_ox), .out_y(r_oy), .out_z(r_oz));
  cordic #(.VECTOR(1'b1)) u_vec (.clk, .rst_n, .in_valid(v_in_v), .in_x(v_x), .in_y(v_y), .in_z(16'h0),
    .out_valid(v_out_v), .out_x(v_ox), .out_y(v_oy), .out_z(v_oz));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real a, ex, ey, em, ea, d;
    int lat;
    r_in_v = 0; v_in_v = 0; r_x = 0; r_y = 0; r_z = 0; v_x = 0; v_y = 0;
    #2 rst_n = 0; #20 rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      r_x <= 16'($signed($urandom_range(0, 40000)) - 20000);
      r_y <= 16'($signed($urandom_range(0, 40000)) - 20000);
      r_z <= 16'($urandom);
      v_x <= 16'($signed($urandom_range(0, 40000)) - 20000);
      v_y <= 16'($signed($urandom_range(0, 40000)) - 20000);
      r_in_v <= 1; v_in_v <= 1;
      @(posedge clk);
      r_in_v <= 0; v_in_v <= 0;
      lat = 0;
      while (!r_out_v) begin @(posedge clk); lat++; end
      check(lat + 1 == 14 + 3, $sformatf("latency %0d", lat + 1));   // ITER+2 after the sampling edge
      a = 2.0 * PI * real'(r_z) / 65536.0;
      ex = r_x * $cos(a) - r_y * $sin(a);
      ey = r_x * $sin(a) + r_y * $cos(a);
      check((r_ox - ex) < 12 && (ex - r_ox) < 12 && (r_oy - ey) < 12 && (ey - r_oy) < 12,
            $sformatf("rotate (%0d,%0d) by %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", r_x, r_y, r_z, r_ox, r_oy, ex, ey));
      em = $sqrt(real'(v_x) * v_x + real'(v_y) * v_y);
      ea = $atan2(real'(v_y), real'(v_x)) / (2.0 * PI) * 65536.0;
      d = real'($signed(v_oz)) - ea;
      if (d > 32768.0) d = d - 65536.0;
      if (d < -32768.0) d = d + 65536.0;
      if (em > 200.0) check(d < 16.0 && d > -16.0, $sformatf("angle of (%0d,%0d): %0d expected %0.1f", v_x, v_y, $signed(v_oz), ea));
      if (em < 32000.0) check((v_ox - em) < 12 && (em - v_ox) < 12, $sformatf("magnitude %0d expected %0.1f", v_ox, em));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
