// tb_htree_switch: self-checking test of one H-tree switch.
// Two switches with 16-bit child busses, one registered and one not, get the
// same random link settings per 4-bit portion through configuration
// commands; random bus values are then applied and every outgoing bus is
// compared with a model of the links (registered one a cycle later). Also
// checks that commands for another switch number are ignored and that reset
// clears the links.
module tb_htree_switch;
  import mgr_pkg::*;
  localparam int N = 16;
  localparam int P = N / 4;
  logic clk = 0, rst_n = 0;
  cfg_cmd_t cfg_cmd;
  logic [2*N-1:0] p_in, p_out_c, p_out_r;
  logic [N-1:0] cl_out, cr_out, cl_in_c, cr_in_c, cl_in_r, cr_in_r;
  int checks = 0, failures = 0;
  int sel [4][P];

  htree_switch #(.N(N), .ID(5), .REG(1'b0)) dut_c (
    .clk, .rst_n, .cfg_cmd, .p_in, .p_out(p_out_c), .cl_out, .cr_out, .cl_in(cl_in_c), .cr_in(cr_in_c));
  htree_switch #(.N(N), .ID(5), .REG(1'b1)) dut_r (
    .clk, .rst_n, .cfg_cmd, .p_in, .p_out(p_out_r), .cl_out, .cr_out, .cl_in(cl_in_r), .cr_in(cr_in_r));

  always #5 clk = ~clk;

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model(int dd);
    logic [N-1:0] v;
    for (int q = 0; q < P; q++)
      case (sel[dd][q])
        1: v[q*4 +: 4] = p_in[q*4 +: 4];
        2: v[q*4 +: 4] = p_in[N + q*4 +: 4];
        3: v[q*4 +: 4] = cl_out[q*4 +: 4];
        4: v[q*4 +: 4] = cr_out[q*4 +: 4];
        default: v[q*4 +: 4] = '0;
      endcase
    return v;
  endfunction

  task automatic cmp(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    cfg_cmd = '0; p_in = 0; cl_out = 0; cr_out = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int dd = 0; dd < 4; dd++) for (int q = 0; q < P; q++) sel[dd][q] = 0;
    for (int round = 0; round < 6; round++) begin
      // configure
      for (int dd = 0; dd < 4; dd++)
        for (int q = 0; q < P; q++) begin
          @(negedge clk);
          sel[dd][q] = $urandom_range(0, 4);
          cfg_cmd = '{valid: 1, kind: CFG_SWITCH, unit: 5, index: 16'((dd << 14) | q), data: 16'(sel[dd][q])};
        end
      // a command for another switch must be ignored
      @(negedge clk);
      cfg_cmd = '{valid: 1, kind: CFG_SWITCH, unit: 6, index: 0, data: 16'((sel[0][0] + 1) % 5)};
      @(negedge clk); cfg_cmd = '0;
      for (int t = 0; t < 20; t++) begin
        logic [N-1:0] e0, e1, e2, e3;
        p_in = $urandom; cl_out = 16'($urandom); cr_out = 16'($urandom);
        #1;
        e0 = model(0); e1 = model(1); e2 = model(2); e3 = model(3);
        cmp(cl_in_c, e0, "cl_in comb"); cmp(cr_in_c, e1, "cr_in comb");
        cmp(p_out_c[N-1:0], e2, "p_out lo comb"); cmp(p_out_c[2*N-1:N], e3, "p_out hi comb");
        @(posedge clk); #1;
        cmp(cl_in_r, e0, "cl_in reg"); cmp(cr_in_r, e1, "cr_in reg");
        cmp(p_out_r[N-1:0], e2, "p_out lo reg"); cmp(p_out_r[2*N-1:N], e3, "p_out hi reg");
        @(negedge clk);
      end
    end
    rst_n = 0; #1; rst_n = 1;
    p_in = '1; cl_out = '1; cr_out = '1; #1;
    cmp(cl_in_c, '0, "reset clears links");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
