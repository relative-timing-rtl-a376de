`timescale 1ps/1ps
// tb_domino_gate: self-checking testbench for domino_gate.
//
// Instantiates a footed and an unfooted gate on the same inputs and applies
// 600 random input vectors. After each vector the outputs are compared with
// a reference set-reset flop evaluated here: footed f_s = x&a&(b|c), unfooted
// f_s = a&(b|c), both with f_r = ~x, set taking precedence, hold otherwise.
// The run also counts how often each gate held, set and reset.
module tb_domino_gate;

  logic x = 1'b0, a = 1'b0, b = 1'b0, c = 1'b0;
  logic z_f, z_u;
  logic ref_f = 1'b0, ref_u = 1'b0;
  int   checks = 0, failures = 0;
  int   n_set = 0, n_rst = 0, n_hold = 0;

  domino_gate #(.FOOTED(1'b1)) dut_f (.x(x), .a(a), .b(b), .c(c), .z(z_f));
  domino_gate #(.FOOTED(1'b0)) dut_u (.x(x), .a(a), .b(b), .c(c), .z(z_u));

  task automatic apply(input logic [3:0] v);
    logic fs_f, fs_u;
    {x, a, b, c} = v;
    #10;
    fs_f = x & a & (b | c);
    fs_u = a & (b | c);
    if (fs_f) begin ref_f = 1'b1; n_set++; end
    else if (!x) begin ref_f = 1'b0; n_rst++; end
    else n_hold++;
    if (fs_u) ref_u = 1'b1;
    else if (!x) ref_u = 1'b0;
    checks += 2;
    if (z_f !== ref_f) begin failures++; $display("FAIL footed v=%b z=%b exp %b", v, z_f, ref_f); end
    if (z_u !== ref_u) begin failures++; $display("FAIL unfooted v=%b z=%b exp %b", v, z_u, ref_u); end
  endtask

  initial begin
    apply(4'b0000);
    for (int i = 0; i < 600; i++) apply(4'($urandom_range(0, 15)));
    checks++;
    if (n_set == 0 || n_rst == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage set=%0d reset=%0d hold=%0d", n_set, n_rst, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
