// Self-checking testbench for the threshold-gate hold stage.
//
// Drives the (set, reset) pair through random sequences of the three
// combinations a threshold gate can produce: (0,0) all inputs at 0,
// (0,1) some inputs at 1 but the function false, (1,1) function true.
// Reference: z goes to 1 on (1,1), to 0 on (0,0) and keeps its value on
// (0,1). Counts the holds in each direction; both must occur.
module tb_ncl_hold;

  localparam int STEPS = 3000;

  logic set, reset, z, z_ref;
  int checks = 0, failures = 0, held_one = 0, held_zero = 0;

  ncl_hold dut (.set(set), .reset(reset), .z(z));

  task automatic step(input logic s, input logic r);
    set = s;
    reset = r;
    if (s && r)   z_ref = 1'b1;
    else if (!r)  z_ref = 1'b0;
    else if (z_ref) held_one++;
    else            held_zero++;
    #1;
    checks++;
    if (z !== z_ref) begin
      failures++;
      if (failures < 10) $display("FAIL set=%b reset=%b z=%b expected %b", s, r, z, z_ref);
    end
  endtask

  initial begin
    z_ref = 1'b0;
    step(1'b0, 1'b0);
    for (int i = 0; i < STEPS; i++) begin
      case ($urandom_range(2, 0))
        0: step(1'b0, 1'b0);
        1: step(1'b0, 1'b1);
        default: step(1'b1, 1'b1);
      endcase
    end
    checks += 2;
    if (held_one == 0)  failures++;
    if (held_zero == 0) failures++;
    $display("held_one=%0d held_zero=%0d", held_one, held_zero);
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
