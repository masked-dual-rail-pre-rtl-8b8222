// tb_mdpl_maj: exhaustive check of the 3-input majority gate against a count
// of the ones on its inputs, plus a monotonicity check: raising inputs one at
// a time from 000 never makes the output fall.
module tb_mdpl_maj;
  logic a, b, c, q;
  int checks = 0, failures = 0;

  mdpl_maj dut (.a, .b, .c, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (q !== (32'(a) + 32'(b) + 32'(c) >= 2)) begin
        failures++;
        $display("FAIL %b%b%b -> %b", a, b, c, q);
      end
    end
    // monotonic: rising inputs in every order
    for (int p = 0; p < 6; p++) begin
      logic prev;
      int order [3];
      case (p)
        0: order = '{0, 1, 2};
        1: order = '{0, 2, 1};
        2: order = '{1, 0, 2};
        3: order = '{1, 2, 0};
        4: order = '{2, 0, 1};
        default: order = '{2, 1, 0};
      endcase
      {a, b, c} = 3'b000;
      #1;
      prev = q;
      for (int k = 0; k < 3; k++) begin
        case (order[k]) 0: a = 1'b1; 1: b = 1'b1; default: c = 1'b1; endcase
        #1;
        checks++;
        if (prev && !q) begin
          failures++;
          $display("FAIL output fell");
        end
        prev = q;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
