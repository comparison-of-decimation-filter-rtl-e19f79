// sinc_ref_pkg: reference model for the decimator testbenches.
//
// Computes the impulse response h of ((1 - z^-N)/(1 - z^-1))^K directly, by
// convolving a length-N box with itself K times, and evaluates the filter
// output at any input index as the plain convolution sum over a stored input
// history (samples before index 0 are zero). This is independent of all the
// hardware structures: no integrators, no stage cascade, no polyphase split.
package sinc_ref_pkg;

  class sinc_ref;
    longint h[];
    int     len;

    function new(int n, int k);
      longint t[];
      h   = new[1];
      h[0] = 1;
      len = 1;
      for (int r = 0; r < k; r++) begin
        t = new[len + n - 1];
        foreach (t[i]) t[i] = 0;
        for (int i = 0; i < len; i++)
          for (int j = 0; j < n; j++) t[i+j] += h[i];
        h   = t;
        len = len + n - 1;
      end
    endfunction

    // Filter output at input index idx for the history xs[0..].
    function longint at(ref longint xs[$], input int idx);
      longint acc = 0;
      for (int j = 0; j < len; j++)
        if (idx - j >= 0 && idx - j < xs.size()) acc += h[j] * xs[idx-j];
      return acc;
    endfunction
  endclass

endpackage
