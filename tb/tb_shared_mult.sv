// tb_shared_mult: checks that the shared multiplier multiplies the operands
// of the subcore selected by the stage code, and gives zero when no
// multiplying stage is active.
module tb_shared_mult;
  import mp3_pkg::*;
  stage_e    stage;
  mul_req_t  r0, r1, r2;
  mul_prod_t prod;
  int checks = 0, failures = 0;

  shared_mult dut (.stage, .req_req(r0), .alias_req(r1), .imdct_req(r2), .prod);

  initial begin
    for (int n = 0; n < 300; n++) begin
      longint exp_v;
      r0.a = $urandom; r0.b = coef_t'($urandom);
      r1.a = $urandom; r1.b = coef_t'($urandom);
      r2.a = $urandom; r2.b = coef_t'($urandom);
      stage = stage_e'(n % 7);
      #1;
      case (stage)
        ST_REQ:   exp_v = longint'(r0.a) * longint'(r0.b);
        ST_ALIAS: exp_v = longint'(r1.a) * longint'(r1.b);
        ST_IMDCT: exp_v = longint'(r2.a) * longint'(r2.b);
        default:  exp_v = 0;
      endcase
      checks++;
      if (longint'(prod) != exp_v) begin
        failures++;
        if (failures < 5) $display("stage %0d: %0d vs %0d", stage, prod, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
