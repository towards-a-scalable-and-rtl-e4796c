// tb_wire_link: drives random flits through a coded wired link with random wire errors.
//   - up to three flipped wires: the flit arrives intact, in the same cycle, and is taken when
//     the receiver's VC buffer has room; 'corrected' is set exactly when a wire was flipped
//   - the same two data bits flipped in both copies (a detected pattern): the flit is held back
//     (dn_valid low, up_taken low, retry high), then goes through once the error is gone
//   - the VC ready bits pass upstream unchanged and type/VC travel unchanged
module tb_wire_link;
  import winoc_pkg::*;
  int checks = 0, failures = 0;
  logic up_valid, up_taken, dn_valid, corrected, retry;
  flit_t up_flit, dn_flit;
  logic [NVC-1:0] up_vc_ready, dn_vc_ready;
  logic [77:0] err;

  wire_link dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_fix = 0, n_retry = 0;
    for (int t = 0; t < 20000; t++) begin
      automatic int ne = $urandom_range(4, 0);
      up_flit.ftype = ftype_e'($urandom_range(3, 0));
      up_flit.vc = 2'($urandom);
      up_flit.data = $urandom;
      up_valid = 1'($urandom);
      dn_vc_ready = NVC'($urandom);
      err = '0;
      if (ne < 4) begin
        // distinct wires
        while ($countones(err) < ne) err[$urandom_range(77, 0)] = 1'b1;
      end else begin
        automatic int a = $urandom_range(15, 0), b = $urandom_range(31, 16);
        err[2*a] = 1; err[2*a+1] = 1; err[2*b] = 1; err[2*b+1] = 1;
      end
      #1;
      check(up_vc_ready == dn_vc_ready, "vc ready passes upstream");
      if (ne < 4) begin
        check(dn_valid == up_valid && !retry, "valid passes, no retry");
        check(dn_flit == up_flit, "flit intact");
        check(corrected == (ne != 0), "corrected flag");
        check(up_taken == (up_valid && dn_vc_ready[up_flit.vc]), "taken");
        if (ne != 0) n_fix++;
      end else begin
        check(!dn_valid && !up_taken && retry == up_valid, "detected pattern held back");
        if (up_valid) n_retry++;
        // retransmission on the next cycle, without the error
        err = '0;
        #1;
        check(dn_valid == up_valid && dn_flit == up_flit && !retry, "flit goes through on retry");
      end
    end
    check(n_fix > 0 && n_retry > 0, "both cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
