// Self-checking testbench for the threshold gate TH24comp, Z = AC + AD + BC + BD.
//
// Drives the gate inputs through a long random sequence of input vectors,
// changing one input per step (as in a 4-phase circuit) or several at once,
// and compares z after every step with a reference threshold-gate model:
// z' = 1 if the gate function is true, 0 if every input is 0, z otherwise.
// It counts how often the gate held a 1 with its function false (hysteresis
// on the way down) and held a 0 with some inputs at 1 (on the way up); both
// must happen.
module tb_ncl_th24comp;

  localparam int N = 4;
  localparam int STEPS = 4000;

  logic [N-1:0] v;
  logic         z;
  logic         z_ref;
  int checks = 0, failures = 0;
  int held_one = 0, held_zero = 0, sets = 0, clears = 0;

  ncl_th24comp dut (.a(v[0]), .b(v[1]), .c(v[2]), .d(v[3]), .z(z));

  function automatic logic f_set(input logic [N-1:0] x);
    return x[0] & x[2] | x[0] & x[3] | x[1] & x[2] | x[1] & x[3];
  endfunction

  task automatic step(input logic [N-1:0] nv);
    logic prev = z_ref;
    v = nv;
    if (f_set(nv))      z_ref = 1'b1;
    else if (nv == '0)  z_ref = 1'b0;
    if (prev && z_ref && !f_set(nv)) held_one++;
    if (!prev && !z_ref && nv != '0) held_zero++;
    if (!prev && z_ref) sets++;
    if (prev && !z_ref) clears++;
    #1;
    checks++;
    if (z !== z_ref) begin
      failures++;
      if (failures < 10) $display("FAIL v=%b z=%b expected %b", nv, z, z_ref);
    end
  endtask

  initial begin
    z_ref = 1'b0;
    step('0);
    for (int s = 0; s < STEPS; s++) begin
      if ($urandom_range(3, 0) == 0) step(N'($urandom));
      else step(v ^ (N'(1) << $urandom_range(N - 1, 0)));
    end
    step('0);
    $display("sets=%0d clears=%0d held_one=%0d held_zero=%0d", sets, clears, held_one, held_zero);
    checks += 4;
    if (sets == 0)      failures++;
    if (clears == 0)    failures++;
    if (held_one == 0)  failures++;
    if (held_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(STEPS * 2 + 100);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
