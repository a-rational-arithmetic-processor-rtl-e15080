// rat_ref_pkg -- reference arithmetic for the testbenches.
//
// Plain integer models, written independently of the RTL: the greatest
// common divisor by the remainder form of Euclid's algorithm, and a step
// counter that replays the reduction algorithm (normalize, force odd,
// swap, subtract) to predict how many clocks the reduction hardware takes.
package rat_ref_pkg;

  function automatic longint unsigned ref_gcd(longint unsigned a, longint unsigned b);
    longint unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Number of reduction steps for non-zero x, y (one clock each in hardware).
  function automatic int unsigned ref_red_steps(longint unsigned x, longint unsigned y);
    int unsigned    steps = 0;
    longint unsigned t;
    forever begin
      if (x[0] == 1'b0 && y[0] == 1'b0) begin x >>= 1; y >>= 1; end
      else if (x[0] == 1'b0) x >>= 1;
      else if (y[0] == 1'b0) y >>= 1;
      else if (x == y) break;
      else if (y < x) begin t = x; x = y; y = t; end
      else y = y - x;
      steps++;
    end
    return steps;
  endfunction

  // Odd part of a non-zero value's common factor: gcd with the shared power
  // of two removed.
  function automatic longint unsigned ref_odd_gcd(longint unsigned a, longint unsigned b);
    longint unsigned g = ref_gcd(a, b);
    while (g[0] == 1'b0) g >>= 1;
    return g;
  endfunction

endpackage
