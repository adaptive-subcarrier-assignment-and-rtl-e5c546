// dpg_pe6: PE6 of PE array n, Step 5 of the DPG algorithm.
//
// One adder that extends the running sum sum_{l<k} rho^_{l,n} - 1, read from the
// type-3 register, by rho^_{k,n} from PE2.  The type-3 register already presents
// -1 when k is the first user, so the sum restarts every outer iteration.  The
// output goes back to the type-3 register and to PE3.  Combinational.
module dpg_pe6
  import dpg_pkg::*;
(
  input  fx_t acc,       // sum_{l<k} rho^_{l,n} - 1
  input  fx_t rho_h,     // rho^_{k,n}
  output fx_t acc_next   // sum_{l<=k} rho^_{l,n} - 1
);

  assign acc_next = sat(wx(acc) + wx(rho_h));

endmodule
