// tb_ba_alu_ci: self-checking testbench of the Bayesian-algebra ALU custom
// instruction. Issues random add, multiply and divide instructions the way a
// Nios II processor does (start pulse, operands held until done), checks each
// result against the Bayesian-algebra reference and each latency (done 8, 6
// and 7 cycles after start), then evaluates 1/((a+b)*(1/c+d)) as a sequence of
// five instructions (two additions, one multiplication, two divisions).
`timescale 1ns/1ps
module tb_ba_alu_ci;
  import tb_fp_pkg::*;

  logic        ncs_clk = 0;
  logic        ncs_clk_en, ncs_reset, ncs_start, ncs_done;
  logic [1:0]  ncs_n;
  logic [31:0] ncs_dataa, ncs_datab, ncs_result;
  int checks = 0, failures = 0;
  int n_op[4] = '{0, 0, 0, 0};

  ba_alu_ci dut (.*);

  always #5 ncs_clk = ~ncs_clk;

  initial begin
    repeat (200000) @(posedge ncs_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ci(input logic [1:0] n, input logic [31:0] a, b, output logic [31:0] r, output int cyc);
    @(negedge ncs_clk);
    ncs_n = n; ncs_dataa = a; ncs_datab = b; ncs_start = 1;
    @(negedge ncs_clk);
    ncs_start = 0;
    cyc = 1;
    while (!ncs_done) begin
      @(negedge ncs_clk);
      cyc++;
    end
    r = ncs_result;
    n_op[n]++;
  endtask

  function automatic logic [31:0] pick();
    case ($urandom_range(7))
      0: return 32'd0;
      1: return F_INF;
      default: return rand_pos(100, 150);
    endcase
  endfunction

  initial begin
    logic [31:0] a, b, r, e;
    int cyc, lat;
    ncs_reset = 1; ncs_clk_en = 1; ncs_start = 0; ncs_n = 0; ncs_dataa = 0; ncs_datab = 0;
    repeat (3) @(posedge ncs_clk);
    ncs_reset = 0;
    for (int i = 0; i < 600; i++) begin
      logic [1:0] n;
      n = 2'($urandom_range(2));
      a = pick(); b = pick();
      ci(n, a, b, r, cyc);
      case (n)
        0: begin e = ref_ba_add(a, b);  lat = 8; end
        1: begin e = ref_ba_mult(a, b); lat = 6; end
        default: begin e = ref_ba_div(a, b); lat = 7; end
      endcase
      checks += 2;
      if (r !== e) begin
        failures++;
        if (failures < 10) $display("op %0d: %h, %h -> %h, expected %h", n, a, b, r, e);
      end
      if (cyc != lat) begin
        failures++;
        if (failures < 10) $display("op %0d took %0d cycles, expected %0d", n, cyc, lat);
      end
    end
    // unused index answers at once
    ci(2'd3, 32'h3F80_0000, 32'h3F80_0000, r, cyc);
    checks++;
    if (r !== 32'd0 || cyc != 1) failures++;
    // 1/((a+b)*(1/c+d)) with five instructions
    for (int i = 0; i < 50; i++) begin
      logic [31:0] va, vb, vc, vd, s1, ic, s2, p, res, er;
      va = rand_pos(115, 135); vb = rand_pos(115, 135); vc = rand_pos(115, 135); vd = rand_pos(115, 135);
      ci(2'd0, va, vb, s1, cyc);
      ci(2'd2, F_ONE, vc, ic, cyc);
      ci(2'd0, ic, vd, s2, cyc);
      ci(2'd1, s1, s2, p, cyc);
      ci(2'd2, F_ONE, p, res, cyc);
      er = ref_ba_div(F_ONE, ref_ba_mult(ref_ba_add(va, vb), ref_ba_add(ref_ba_div(F_ONE, vc), vd)));
      checks++;
      if (res !== er) begin
        failures++;
        $display("1/((a+b)(1/c+d)) = %h, expected %h", res, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
